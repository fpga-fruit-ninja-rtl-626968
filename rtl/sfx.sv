// sfx: sound-effect generator for a piezo buzzer.
//
// One state per sound; a sound is a square wave on `sound` that toggles every
// *_HALF clocks and lasts *_CYCLES clocks, after which the FSM returns to WAIT
// (or chains to the next sound).  Triggers, checked in WAIT in this order:
//   bomb      rising edge of `bomb_slice`                      -> BOMB
//   fruit     rising edge of any fruit slice, while the game
//             state is unchanged                               -> FRUIT
//   life lost `lost_life` changed and was not 3 (3 -> 0 is the
//             counter clearing for a new game, not a loss)     -> LIFE
// A new high score makes the flash controller busy while the game ends.  If
// `busy` is seen while the bomb or life-lost sound plays, flag `r` is set and
// the high-score jingle follows: BOMB -> HS_PAUSE, or LIFE (only when the
// last life is gone) -> HS_PAUSE, then HS_PAUSE (silence) -> HS_TONE1 ->
// HS_TONE2 -> WAIT.  Defaults are the game's values for a 65 MHz clock:
// fruit 0.1 s at ~1.1 kHz, bomb 0.46 s and life 0.1 s at ~217 Hz, then the
// jingle at ~294 Hz and ~392 Hz.  `busy` must already be synchronous to `clk`.
module sfx #(
  parameter int FRUIT_CYCLES = 6_500_000,
  parameter int FRUIT_HALF   = 30_000,
  parameter int BOMB_CYCLES  = 30_000_000,
  parameter int BOMB_HALF    = 150_000,
  parameter int LIFE_CYCLES  = 6_500_000,
  parameter int LIFE_HALF    = 150_000,
  parameter int HS0_CYCLES   = 30_000_000,
  parameter int HS1_CYCLES   = 15_000_000,
  parameter int HS1_HALF     = 110_670,
  parameter int HS2_CYCLES   = 3_000_000,
  parameter int HS2_HALF     = 82_909
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       apple_slice,
  input  logic       orange_slice,
  input  logic       peach_slice,
  input  logic       bomb_slice,
  input  logic [1:0] lost_life,
  input  logic       busy,
  input  logic [1:0] state_in,
  output logic       sound,
  output logic       r
);
  typedef enum logic [2:0] {
    S_WAIT, S_FRUIT, S_BOMB, S_LIFE, S_HS_PAUSE, S_HS_TONE1, S_HS_TONE2
  } state_e;
  state_e state;

  logic [24:0] counter;
  logic [17:0] freq_counter;
  logic old_apple, old_orange, old_peach, old_bomb;
  logic [1:0] old_lost_life, old_state;
  logic fruit_rise;

  assign fruit_rise = (apple_slice && !old_apple) || (orange_slice && !old_orange) ||
                      (peach_slice && !old_peach);

  // Tone parameters of the current state: length, half period (0 = silent)
  // and the state that follows.
  int     len, half;
  state_e next;
  always_comb begin
    len = 1; half = 0; next = S_WAIT;
    case (state)
      S_FRUIT:    begin len = FRUIT_CYCLES; half = FRUIT_HALF; next = S_WAIT; end
      S_BOMB:     begin len = BOMB_CYCLES;  half = BOMB_HALF;
                        next = (r || busy) ? S_HS_PAUSE : S_WAIT; end
      S_LIFE:     begin len = LIFE_CYCLES;  half = LIFE_HALF;
                        next = ((r || busy) && lost_life == 2'd3) ? S_HS_PAUSE : S_WAIT; end
      S_HS_PAUSE: begin len = HS0_CYCLES;   half = 0;          next = S_HS_TONE1; end
      S_HS_TONE1: begin len = HS1_CYCLES;   half = HS1_HALF;   next = S_HS_TONE2; end
      S_HS_TONE2: begin len = HS2_CYCLES;   half = HS2_HALF;   next = S_WAIT; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_WAIT;
      counter       <= '0;
      freq_counter  <= '0;
      sound         <= 1'b0;
      r             <= 1'b0;
      old_apple     <= 1'b0;
      old_orange    <= 1'b0;
      old_peach     <= 1'b0;
      old_bomb      <= 1'b0;
      old_lost_life <= '0;
      old_state     <= '0;
    end else begin
      old_apple     <= apple_slice;
      old_orange    <= orange_slice;
      old_peach     <= peach_slice;
      old_bomb      <= bomb_slice;
      old_lost_life <= lost_life;
      old_state     <= state_in;
      case (state)
        S_WAIT: begin
          sound        <= 1'b0;
          counter      <= '0;
          freq_counter <= '0;
          if (bomb_slice && !old_bomb)                          state <= S_BOMB;
          else if (fruit_rise && old_state == state_in)         state <= S_FRUIT;
          else if (lost_life != old_lost_life && old_lost_life != 2'd3) state <= S_LIFE;
        end
        default: begin
          if (state == S_BOMB || state == S_LIFE) begin
            if (busy) r <= 1'b1;
          end
          if (state == S_HS_TONE1) r <= 1'b0;
          if (counter < 25'(len - 1)) begin
            counter <= counter + 25'd1;
          end else begin
            counter      <= '0;
            freq_counter <= '0;
            sound        <= 1'b0;
            state        <= next;
          end
          if (half > 0 && counter < 25'(len - 1)) begin
            if (freq_counter < 18'(half - 1)) begin
              freq_counter <= freq_counter + 18'd1;
            end else begin
              freq_counter <= '0;
              sound        <= !sound;
            end
          end
        end
      endcase
    end
  end
endmodule
