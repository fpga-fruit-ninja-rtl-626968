// fn_pkg: types, constants and image-content functions shared by the Fruit
// Ninja game modules.
//
// Screen: 1024x768 visible area of a 1344x806 XVGA raster at 65 MHz.  Pixels
// are 24-bit {red, green, blue}; an all-zero pixel means "nothing drawn here"
// and lets the layer below show through.
//
// The image ROM contents are generated by image_index()/image_color().  The
// real game stores hand-drawn 8-bit bitmaps (pixel-art fruit, bomb and text in
// a decorative font); those bitmaps are not reproducible here, so each image is
// a simple stand-in shape of the right size and colour: a disc with a stem for
// fruit, a dark disc with a fuse for the bomb, an outlined frame for text.
// Colour index 0 is black and therefore transparent, as in the original.
package fn_pkg;

  localparam int BOTTOM_Y = 768;   // a fruit is "past the bottom" below this row

  typedef logic [23:0] pixel_t;

  typedef enum logic [1:0] {
    GS_START     = 2'd0,
    GS_PLAY      = 2'd1,
    GS_GAME_OVER = 2'd2
  } game_state_e;

  // Images held in sprite ROMs.
  typedef enum logic [3:0] {
    IMG_APPLE, IMG_ORANGE, IMG_PEACH, IMG_BOMB,
    IMG_LOGO, IMG_PLAY, IMG_REPLAY, IMG_SCORE, IMG_HISCORE
  } image_e;

  // Colour index of stand-in image `img` (w x h) at column c, row r.
  function automatic logic [7:0] image_index(image_e img, int w, int h, int c, int r);
    int dx, dy, rad;
    dx  = 2 * c - (w - 1);
    dy  = 2 * r - (h - 1);
    rad = (w < h ? w : h) - 4;
    case (img)
      IMG_APPLE, IMG_ORANGE, IMG_PEACH: begin
        if (r < h / 6 && c >= w / 2 - 6 && c < w / 2 + 6) return 8'd2;   // stem
        if (dx * dx + dy * dy <= rad * rad * 8 / 10)       return 8'd1;   // body
        return 8'd0;
      end
      IMG_BOMB: begin
        if (r < h / 8 && c < w / 8)                        return 8'd2;   // fuse
        if (dx * dx + dy * dy <= rad * rad * 8 / 10)       return 8'd1;   // shell
        return 8'd0;
      end
      default: begin                                                      // text frame
        if (r < 4 || r >= h - 4 || c < 4 || c >= w - 4)    return 8'd255;
        if (r >= h / 2 - 2 && r < h / 2 + 2)               return 8'd200;
        return 8'd0;
      end
    endcase
  endfunction

  // Colour map of stand-in image `img`: 24-bit colour of colour index `idx`.
  function automatic pixel_t image_color(image_e img, logic [7:0] idx);
    if (idx == 8'd0) return 24'h000000;
    case (img)
      IMG_APPLE:  return (idx == 8'd2) ? 24'h40C040 : 24'hE02020;
      IMG_ORANGE: return (idx == 8'd2) ? 24'h20A040 : 24'hFF8000;
      IMG_PEACH:  return (idx == 8'd2) ? 24'h60C030 : 24'hF8A0A8;
      IMG_BOMB:   return (idx == 8'd2) ? 24'hFFE000 : 24'h303030;
      default:    return {idx, idx, idx};                               // grayscale text
    endcase
  endfunction

endpackage
