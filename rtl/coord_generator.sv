// coord_generator: parabolic trajectory of one fruit (or the bomb), plus the
// per-fruit score and missed-fruit ("fell") counters.
//
// Motion uses repeated addition instead of multiplication.  Once per frame
// (`tick`), while `rdy` is high:
//   START  latch launch parameters (speed, start x, direction) and the
//          `active` bit, put the fruit at y = 700, pulse `new_fruit` for one
//          frame, go to CALC.
//   CALC   x moves by X_VEL pixels per frame left or right; y moves up by the
//          current speed until the speed has reached zero, then down.  Every
//          VEL_PERIOD frames the speed drops by 2 on the way up and grows by 2
//          on the way down (gravity 2).  When a falling fruit passes the
//          bottom (y > 768) y is clamped to 768 and the FSM returns to START.
//          If the fruit was active and not sliced at that point, `fell`
//          increments.  `score` increments on each rising edge of
//          (slice && activeconst).
// `left` is the latched direction of the current flight.
// x is 10 bits and wraps around the screen edge.  The falling edge of `rdy`
// (the game leaves PLAY) clears `fell`, parks y at 768 and forces START; the
// rising edge (a new game) clears `score`.  Both edges are seen on a frame
// tick.  The game's own frame clock is replaced here by a single clock plus
// the `tick` enable; the speed saturates at 30 (5-bit register) as this
// design's own guard.
module coord_generator #(
  parameter int VEL_PERIOD = 9,
  parameter int X_VEL      = 5,
  parameter int START_Y    = 700
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       rdy,
  input  logic       slice,
  input  logic       active,
  input  logic [4:0] yvel,
  input  logic       backwards,
  input  logic [9:0] xcostart,
  output logic [9:0] x_coord,
  output logic [9:0] y_coord,
  output logic [2:0] fell,
  output logic       activeconst,
  output logic [7:0] score,
  output logic [4:0] yvelocity,
  output logic       new_fruit,
  output logic       left
);
  import fn_pkg::*;

  typedef enum logic {S_START, S_CALC} state_e;
  state_e     state;
  logic       old_rdy, falling, slice_q;
  logic [3:0] counter;
  logic [10:0] y_down;
  logic       hit;

  assign hit    = slice && activeconst;
  assign y_down = {1'b0, y_coord} + {6'd0, yvelocity};

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_START;
      old_rdy     <= 1'b0;
      fell        <= '0;
      score       <= '0;
      x_coord     <= '0;
      y_coord     <= 10'(BOTTOM_Y);
      yvelocity   <= '0;
      activeconst <= 1'b0;
      new_fruit   <= 1'b0;
      left        <= 1'b0;
      falling     <= 1'b0;
      slice_q     <= 1'b0;
      counter     <= '0;
    end else if (tick) begin
      old_rdy <= rdy;
      if (!rdy && old_rdy) begin
        fell    <= '0;
        state   <= S_START;
        y_coord <= 10'(BOTTOM_Y);
      end
      if (rdy && !old_rdy) score <= '0;
      if (rdy) begin
        case (state)
          S_START: begin
            activeconst <= active;
            y_coord     <= 10'(START_Y);
            x_coord     <= xcostart;
            yvelocity   <= yvel;
            left        <= backwards;
            falling     <= (yvel == 5'd0);
            counter     <= '0;
            new_fruit   <= 1'b1;
            slice_q     <= 1'b0;
            state       <= S_CALC;
          end
          S_CALC: begin
            new_fruit <= 1'b0;
            slice_q   <= hit;
            if (hit && !slice_q) score <= score + 8'd1;
            x_coord <= left ? x_coord - 10'(X_VEL) : x_coord + 10'(X_VEL);
            // gravity: speed changes every VEL_PERIOD frames
            if (counter == 4'(VEL_PERIOD - 1)) begin
              counter <= '0;
              if (!falling) begin
                yvelocity <= yvelocity - 5'd2;
                if (yvelocity <= 5'd2) falling <= 1'b1;
              end else if (yvelocity < 5'd30) begin
                yvelocity <= yvelocity + 5'd2;
              end
            end else begin
              counter <= counter + 4'd1;
            end
            if (!falling) begin
              y_coord <= y_coord - 10'(yvelocity);
            end else if (y_down > 11'(BOTTOM_Y)) begin
              y_coord <= 10'(BOTTOM_Y);
              state   <= S_START;
              if (activeconst && !slice) fell <= fell + 3'd1;
            end else begin
              y_coord <= y_down[9:0];
            end
          end
          default: state <= S_START;
        endcase
      end
    end
  end
endmodule
