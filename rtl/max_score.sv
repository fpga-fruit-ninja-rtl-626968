// max_score: keeps the all-time high score and sequences its flash storage.
//
// Runs on the flash clock (27 MHz).  It drives an external flash controller
// through `reading`, `writing` and two reset strobes, and watches its `busy`.
//   STARTUP   assert `reading`, go to READ_LOOP.
//   READ_LOOP hold `reading` for READ_HOLD clocks so the controller starts,
//             then drop it and go to CHECK.
//   CHECK     once `busy` is low, take `score_from_flash` as the high score,
//             go to IDLE.
//   IDLE      at game over (`ready`) with `current_score` above the high score:
//             store it as the new high score and as `score_to_store`, pulse
//             both resets (`flash_reset`, `up_reset`) for one clock (erasing
//             needs both), drop `writing`, go to RESET.  A rising edge on
//             `reset_score` does the same with the value 0.
//   RESET     resets low; once `busy` is low raise `writing`, go to STORE.
//   STORE     once `busy` is low the write is done: back to IDLE.
// `score` is the high score register.  The READ_LOOP hold and its length
// come from the game's implementation; state encodings are this design's.
module max_score #(
  parameter int READ_HOLD = 200
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] current_score,
  input  logic [15:0] score_from_flash,
  input  logic        ready,
  input  logic        busy,
  input  logic        reset_score,
  output logic        flash_reset,
  output logic        writing,
  output logic        reading,
  output logic        up_reset,
  output logic [15:0] score,
  output logic [15:0] score_to_store,
  output logic [2:0]  state_out
);
  typedef enum logic [2:0] {
    S_STARTUP, S_READ_LOOP, S_CHECK, S_IDLE, S_RESET, S_STORE
  } state_e;
  state_e state;

  logic [$clog2(READ_HOLD + 1)-1:0] counter;
  logic old_reset_score;

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= S_STARTUP;
      counter         <= '0;
      old_reset_score <= 1'b0;
      flash_reset     <= 1'b0;
      up_reset        <= 1'b0;
      writing         <= 1'b0;
      reading         <= 1'b0;
      score           <= '0;
      score_to_store  <= '0;
    end else begin
      old_reset_score <= reset_score;
      case (state)
        S_STARTUP: begin
          reading <= 1'b1;
          state   <= S_READ_LOOP;
        end
        S_READ_LOOP: begin
          if (counter < ($bits(counter))'(READ_HOLD)) begin
            counter <= counter + 1'b1;
          end else begin
            counter <= '0;
            reading <= 1'b0;
            state   <= S_CHECK;
          end
        end
        S_CHECK: if (!busy) begin
          score <= score_from_flash;
          state <= S_IDLE;
        end
        S_IDLE: begin
          if (ready && current_score > score) begin
            writing        <= 1'b0;
            flash_reset    <= 1'b1;
            up_reset       <= 1'b1;
            score_to_store <= current_score;
            score          <= current_score;
            state          <= S_RESET;
          end else if (reset_score && !old_reset_score) begin
            writing        <= 1'b0;
            flash_reset    <= 1'b1;
            up_reset       <= 1'b1;
            score_to_store <= '0;
            score          <= '0;
            state          <= S_RESET;
          end
        end
        S_RESET: begin
          flash_reset <= 1'b0;
          up_reset    <= 1'b0;
          if (!busy) begin
            writing <= 1'b1;
            state   <= S_STORE;
          end
        end
        S_STORE: if (!busy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign state_out = state;
endmodule
