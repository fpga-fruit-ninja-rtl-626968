// xvga: 1024x768 @ 60 Hz video timing generator (65 MHz pixel clock).
//
// hcount runs 0..1343 per line and vcount 0..805 per frame.  The visible area
// is hcount 0..1023, vcount 0..767.  hsync is low for hcount 1048..1183 and
// vsync is low for lines 777..782 (both active low); blank is high outside the
// visible area.  All outputs are registered and change together on the clock
// edge, so hcount/vcount and the sync/blank flags always describe the same
// pixel.  The counts follow the standard XVGA timing used by the game; the
// synchronous reset is this design's addition.
module xvga #(
  parameter int H_VISIBLE = 1024,
  parameter int H_SYNC_ON = 1048,
  parameter int H_SYNC_OFF = 1184,
  parameter int H_TOTAL   = 1344,
  parameter int V_VISIBLE = 768,
  parameter int V_SYNC_ON = 777,
  parameter int V_SYNC_OFF = 783,
  parameter int V_TOTAL   = 806
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  logic [10:0] h_next;
  logic [9:0]  v_next;

  always_comb begin
    h_next = (hcount == 11'(H_TOTAL - 1)) ? 11'd0 : hcount + 11'd1;
    v_next = vcount;
    if (hcount == 11'(H_TOTAL - 1))
      v_next = (vcount == 10'(V_TOTAL - 1)) ? 10'd0 : vcount + 10'd1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync  <= !(h_next >= 11'(H_SYNC_ON) && h_next < 11'(H_SYNC_OFF));
      vsync  <= !(v_next >= 10'(V_SYNC_ON) && v_next < 10'(V_SYNC_OFF));
      blank  <= (h_next >= 11'(H_VISIBLE)) || (v_next >= 10'(V_VISIBLE));
    end
  end
endmodule
