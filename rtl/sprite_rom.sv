// sprite_rom: image ROM plus colour map for one bitmap.
//
// The image is WIDTH x HEIGHT 8-bit colour indices stored row by row
// (address = column + row * WIDTH).  A second 256-entry table maps an index to
// a 24-bit {R,G,B} colour; index 0 is black, which the game treats as
// transparent.  Both tables are synchronous-read block RAMs, so `pixel` shows
// the colour of `addr` two clock cycles after `addr` is presented.  The ROM
// contents come from fn_pkg::image_index/image_color (stand-in shapes of the
// real bitmaps' size; see fn_pkg).
module sprite_rom #(
  parameter fn_pkg::image_e IMG = fn_pkg::IMG_APPLE,
  parameter int WIDTH  = 150,
  parameter int HEIGHT = 150,
  localparam int DEPTH  = WIDTH * HEIGHT,
  localparam int ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output fn_pkg::pixel_t    pixel
);
  import fn_pkg::*;

  logic [7:0] image [DEPTH];
  pixel_t     cmap  [256];
  logic [7:0] index;

  initial begin
    for (int r = 0; r < HEIGHT; r++)
      for (int c = 0; c < WIDTH; c++)
        image[r * WIDTH + c] = image_index(IMG, WIDTH, HEIGHT, c, r);
    for (int i = 0; i < 256; i++)
      cmap[i] = image_color(IMG, 8'(i));
  end

  always_ff @(posedge clk) begin
    index <= (int'(addr) < DEPTH) ? image[addr] : 8'd0;
    pixel <= cmap[index];
  end
endmodule
