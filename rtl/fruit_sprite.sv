// fruit_sprite: draws one fruit, whole or as two separately moving halves.
//
// Unsliced (`slice` low): the whole WIDTH x HEIGHT bitmap is drawn with its
// top-left corner at (x, y), reading ROM address (hcount-x) + (vcount-y)*WIDTH.
// Sliced: only the top HEIGHT/2 rows are drawn at (x, y); the bottom half is
// drawn at (xslice, yslice), reading the second half of the same ROM:
// (hcount-xslice) + (vcount-yslice)*WIDTH + WIDTH*HEIGHT/2.  One ROM is shared
// by both halves; the address is chosen per pixel (the top half wins if the
// halves overlap, this design's choice).  Nothing is drawn while `active` is
// low.  `pixel` is 0 where nothing is drawn and is valid two clocks after the
// hcount/vcount it belongs to (ROM plus colour map latency).
module fruit_sprite #(
  parameter fn_pkg::image_e IMG = fn_pkg::IMG_APPLE,
  parameter int WIDTH  = 150,
  parameter int HEIGHT = 150,
  localparam int ADDR_W = $clog2(WIDTH * HEIGHT)
) (
  input  logic           clk,
  input  logic           active,
  input  logic           slice,
  input  logic [10:0]    hcount,
  input  logic [9:0]     vcount,
  input  logic [9:0]     x,
  input  logic [9:0]     y,
  input  logic [9:0]     xslice,
  input  logic [9:0]     yslice,
  output fn_pkg::pixel_t pixel
);
  import fn_pkg::*;

  int h, v, xi, yi, xs, ys;
  logic in_whole, in_top, in_bot, show;
  logic [ADDR_W-1:0] addr;
  logic [1:0] show_d;
  pixel_t rom_pixel;

  always_comb begin
    h  = int'(hcount);
    v  = int'(vcount);
    xi = int'(x);
    yi = int'(y);
    xs = int'(xslice);
    ys = int'(yslice);
    in_whole = h >= xi && h < xi + WIDTH && v >= yi && v < yi + HEIGHT;
    in_top   = in_whole && v < yi + HEIGHT / 2;
    in_bot   = h >= xs && h < xs + WIDTH && v >= ys && v < ys + HEIGHT / 2;
    show = 1'b0;
    addr = ADDR_W'((h - xi) + (v - yi) * WIDTH);
    if (active) begin
      if (!slice) begin
        show = in_whole;
      end else if (in_top) begin
        show = 1'b1;
      end else if (in_bot) begin
        show = 1'b1;
        addr = ADDR_W'((h - xs) + (v - ys) * WIDTH + WIDTH * (HEIGHT / 2));
      end
    end
  end

  sprite_rom #(.IMG(IMG), .WIDTH(WIDTH), .HEIGHT(HEIGHT)) rom (
    .clk(clk), .addr(addr), .pixel(rom_pixel));

  always_ff @(posedge clk) show_d <= {show_d[0], show};

  assign pixel = show_d[1] ? rom_pixel : '0;
endmodule
