// debounce: cleans a mechanical push-button signal.  `clean` follows `noisy`
// only after `noisy` has held the new value for DELAY consecutive clocks
// (DELAY = 650000 is 10 ms at 65 MHz).  On reset `clean` takes the input value
// at once.  Used for the user reset button; the game names this function but
// does not describe it, so the delay is this design's choice.
module debounce #(
  parameter int DELAY = 650_000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);
  logic [$clog2(DELAY + 1)-1:0] count;
  logic new_val;

  always_ff @(posedge clk) begin
    if (rst) begin
      new_val <= noisy;
      clean   <= noisy;
      count   <= '0;
    end else if (noisy != new_val) begin
      new_val <= noisy;
      count   <= '0;
    end else if (count == ($bits(count))'(DELAY)) begin
      clean <= new_val;
    end else begin
      count <= count + 1'b1;
    end
  end
endmodule
