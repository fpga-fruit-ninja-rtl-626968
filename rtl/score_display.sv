// score_display: draws a number 0..99 as two seven-segment digits on the VGA
// screen, one rectangle (blob) per segment.
//
// Digit geometry, relative to a digit's top-left corner: vertical segments
// are 10 wide and 44 tall (top-left at (0,0), top-right at (34,0), bottom-left
// at (0,34)); the bottom-right one is 10x54 at (34,34); horizontal segments are
// 44x10 at (0,0) (top), (0,34) (middle) and (0,78) (bottom).  The tens digit is
// at (x, y) and the ones digit 50 pixels to its right.  A leading zero is
// shown.  Values of 100 and more show 99 (this design's choice).  The digit
// values are registered from `value`; `pixel` has the blob latency of two
// clocks after hcount/vcount.
module score_display (
  input  logic           clk,
  input  logic [7:0]     value,
  input  fn_pkg::pixel_t color,
  input  logic [10:0]    hcount,
  input  logic [9:0]     vcount,
  input  logic [10:0]    x,
  input  logic [9:0]     y,
  output fn_pkg::pixel_t pixel
);
  import fn_pkg::*;

  // segment order: 0 top-left, 1 top, 2 top-right, 3 bottom-left,
  //                4 bottom-right, 5 middle, 6 bottom
  localparam int SEG_X [7] = '{0, 0, 34, 0, 34, 0, 0};
  localparam int SEG_Y [7] = '{0, 0, 0, 34, 34, 34, 78};
  localparam int SEG_W [7] = '{10, 44, 10, 10, 10, 44, 44};
  localparam int SEG_H [7] = '{44, 10, 44, 44, 54, 10, 10};

  function automatic logic [6:0] segments(logic [3:0] d);
    //          B M BR BL TR T TL
    case (d)
      4'd0: return 7'b1011111;
      4'd1: return 7'b0010100;
      4'd2: return 7'b1101110;
      4'd3: return 7'b1110110;
      4'd4: return 7'b0110101;
      4'd5: return 7'b1110011;
      4'd6: return 7'b1111011;
      4'd7: return 7'b0010110;
      4'd8: return 7'b1111111;
      default: return 7'b1110111;  // 9
    endcase
  endfunction

  logic [3:0] tens, ones;
  logic [6:0] seg_on [2];
  pixel_t     seg_pix [2][7];

  always_ff @(posedge clk) begin
    if (value >= 8'd99) begin
      tens <= 4'd9;
      ones <= 4'd9;
    end else begin
      tens <= 4'(value / 8'd10);
      ones <= 4'(value % 8'd10);
    end
  end

  assign seg_on[0] = segments(tens);
  assign seg_on[1] = segments(ones);

  for (genvar d = 0; d < 2; d++) begin : g_digit
    for (genvar s = 0; s < 7; s++) begin : g_seg
      blob #(.WIDTH(SEG_W[s]), .HEIGHT(SEG_H[s])) seg (
        .clk(clk), .display(seg_on[d][s]), .color(color),
        .hcount(hcount), .vcount(vcount),
        .x(x + 11'(50 * d + SEG_X[s])), .y(y + 10'(SEG_Y[s])),
        .pixel(seg_pix[d][s]));
    end
  end

  always_comb begin
    pixel = '0;
    for (int d = 0; d < 2; d++)
      for (int s = 0; s < 7; s++)
        pixel = pixel | seg_pix[d][s];
  end
endmodule
