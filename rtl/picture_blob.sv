// picture_blob: draws a WIDTH x HEIGHT bitmap with its top-left corner at
// (x, y).  Used for the bomb (which is never cut in half) and for the text
// and logo images of the start and game-over screens.  Nothing is drawn while
// `active` is low.  `pixel` is 0 outside the picture and on its black
// (transparent) pixels, and is valid two clocks after its hcount/vcount.
module picture_blob #(
  parameter fn_pkg::image_e IMG = fn_pkg::IMG_BOMB,
  parameter int WIDTH  = 150,
  parameter int HEIGHT = 150,
  localparam int ADDR_W = $clog2(WIDTH * HEIGHT)
) (
  input  logic           clk,
  input  logic           active,
  input  logic [10:0]    hcount,
  input  logic [9:0]     vcount,
  input  logic [10:0]    x,
  input  logic [9:0]     y,
  output fn_pkg::pixel_t pixel
);
  import fn_pkg::*;

  int h, v, xi, yi;
  logic show;
  logic [ADDR_W-1:0] addr;
  logic [1:0] show_d;
  pixel_t rom_pixel;

  always_comb begin
    h    = int'(hcount);
    v    = int'(vcount);
    xi   = int'(x);
    yi   = int'(y);
    show = active && h >= xi && h < xi + WIDTH && v >= yi && v < yi + HEIGHT;
    addr = ADDR_W'((h - xi) + (v - yi) * WIDTH);
  end

  sprite_rom #(.IMG(IMG), .WIDTH(WIDTH), .HEIGHT(HEIGHT)) rom (
    .clk(clk), .addr(addr), .pixel(rom_pixel));

  always_ff @(posedge clk) show_d <= {show_d[0], show};

  assign pixel = show_d[1] ? rom_pixel : '0;
endmodule
