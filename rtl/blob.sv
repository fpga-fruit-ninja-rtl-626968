// blob: solid WIDTH x HEIGHT rectangle of colour `color` with its top-left
// corner at (x, y), drawn while `display` is high.  Used for the life markers,
// the cursor and the segments of the on-screen score digits.  `pixel` is 0
// outside the rectangle.  It is registered twice so that it lines up with the
// two-cycle latency of the bitmap drawers (this design's choice).
module blob #(
  parameter int WIDTH  = 64,
  parameter int HEIGHT = 64
) (
  input  logic           clk,
  input  logic           display,
  input  fn_pkg::pixel_t color,
  input  logic [10:0]    hcount,
  input  logic [9:0]     vcount,
  input  logic [10:0]    x,
  input  logic [9:0]     y,
  output fn_pkg::pixel_t pixel
);
  import fn_pkg::*;

  logic   in_rect;
  pixel_t p1;

  assign in_rect = display &&
                  {1'b0, hcount} >= {1'b0, x} && {1'b0, hcount} < {1'b0, x} + 12'(WIDTH) &&
                  {1'b0, vcount} >= {1'b0, y} && {1'b0, vcount} < {1'b0, y} + 11'(HEIGHT);

  always_ff @(posedge clk) begin
    p1    <= in_rect ? color : '0;
    pixel <= p1;
  end
endmodule
