// background: full-screen background colour that sweeps between pink and
// blue.  Green and blue are fixed at 164 and 255; red steps by one per frame
// (`tick`, one pulse per vsync), counting up to 255 and then back down to 0,
// forever.  `pixel` = {red, 164, 255} and changes only on frame ticks.
// Values are the game's; the synchronous reset to red = 0, counting up, is
// this design's addition.
module background (
  input  logic           clk,
  input  logic           rst,
  input  logic           tick,
  output fn_pkg::pixel_t pixel
);
  logic [7:0] red;
  logic       up;

  always_ff @(posedge clk) begin
    if (rst) begin
      red <= 8'd0;
      up  <= 1'b1;
    end else if (tick) begin
      if (up) begin
        red <= red + 8'd1;
        if (red == 8'd254) up <= 1'b0;
      end else begin
        red <= red - 8'd1;
        if (red == 8'd1) up <= 1'b1;
      end
    end
  end

  assign pixel = {red, 8'd164, 8'd255};
endmodule
