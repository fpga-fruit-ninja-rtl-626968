// flash_model: behavioural stand-in for the flash controller and chip that
// store the high score.  A rising edge of `reading` makes it busy for
// READ_BUSY clocks and presents the stored word on `rdata`; a reset pulse
// (`flash_reset` together with `up_reset`) erases the word to 16'hFFFF while
// busy for ERASE_BUSY clocks; a rising edge of `writing` stores `wdata`
// while busy for WRITE_BUSY clocks.  `busy` also rises combinationally with
// each request so that a requester sees it on the next clock.  Counts the
// operations it served; `rst` restores the initial word and clears the counts.  Testbench use only.
module flash_model #(
  parameter int READ_BUSY  = 50,
  parameter int ERASE_BUSY = 80,
  parameter int WRITE_BUSY = 40,
  parameter logic [15:0] INIT = 16'd37
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        reading,
  input  logic        writing,
  input  logic        flash_reset,
  input  logic        up_reset,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        busy,
  output int          reads,
  output int          erases,
  output int          writes,
  output int          half_resets
);
  logic [15:0] stored = INIT;
  int          cnt = 0;
  logic        reading_q = 0, writing_q = 0;
  logic        rd_rise, wr_rise;

  assign rd_rise = reading && !reading_q;
  assign wr_rise = writing && !writing_q;
  assign busy    = !rst && ((cnt != 0) || rd_rise || wr_rise || flash_reset);

  initial begin reads = 0; erases = 0; writes = 0; half_resets = 0; rdata = 16'hDEAD; end

  always @(posedge clk) begin
    if (rst) begin
      stored <= INIT; cnt <= 0; reading_q <= 0; writing_q <= 0;
      reads = 0; erases = 0; writes = 0; half_resets = 0;
    end else begin
    reading_q <= reading;
    writing_q <= writing;
    if (cnt != 0) cnt <= cnt - 1;
    if (rd_rise) begin cnt <= READ_BUSY; rdata <= stored; reads++; end
    if (flash_reset != up_reset) half_resets++;
    if (flash_reset && up_reset) begin cnt <= ERASE_BUSY; stored <= 16'hFFFF; erases++; end
    if (wr_rise) begin
      cnt <= WRITE_BUSY;
      if (stored == 16'hFFFF) stored <= wdata;   // only an erased word can be written
      else stored <= stored & wdata;
      writes++;
    end
    end
  end
endmodule
