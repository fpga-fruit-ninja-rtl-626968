// slower: brings the game's `game over` flag and score from the 65 MHz game
// clock into the 27 MHz flash clock domain through STAGES registers each.
// The score is only used while game over is set, when it no longer changes,
// so a plain multi-register transfer is enough for it; the flag is a level.
// Latency: STAGES cycles of `clk` (the 27 MHz clock).
module slower #(
  parameter int STAGES = 3,
  parameter int W      = 16
) (
  input  logic         clk,
  input  logic         r_in,
  input  logic [W-1:0] c_in,
  output logic         r,
  output logic [W-1:0] c
);
  logic         r_q [STAGES];
  logic [W-1:0] c_q [STAGES];

  always_ff @(posedge clk) begin
    r_q[0] <= r_in;
    c_q[0] <= c_in;
    for (int i = 1; i < STAGES; i++) begin
      r_q[i] <= r_q[i-1];
      c_q[i] <= c_q[i-1];
    end
  end

  assign r = r_q[STAGES-1];
  assign c = c_q[STAGES-1];
endmodule
