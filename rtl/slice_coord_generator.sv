// slice_coord_generator: trajectory of the bottom half of a sliced fruit.
//
// WAIT: the bottom half rides with the whole fruit: x follows `xcostart` and
//       y follows `ycostart` (the fruit's y plus half the picture height).
//       When `begincalc` (the fruit's slice level) is seen, go to CALC.
// CALC: the half falls from rest: its speed starts at `yvel` (0 in the game)
//       and grows by 2 every VEL_PERIOD frames; y increases by the speed and
//       is held at 768 once past the bottom.  x moves X_VEL pixels per frame
//       in the direction given by `backwards` (the game feeds the opposite of
//       the top half's direction so the halves separate).  A `new_fruit`
//       pulse returns the FSM to WAIT.
// All updates happen once per frame (`tick`).  The speed saturates at 30 as
// this design's own overflow guard.
module slice_coord_generator #(
  parameter int VEL_PERIOD = 9,
  parameter int X_VEL      = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       begincalc,
  input  logic [4:0] yvel,
  input  logic       new_fruit,
  input  logic       backwards,
  input  logic [9:0] xcostart,
  input  logic [9:0] ycostart,
  output logic [9:0] x_coord,
  output logic [9:0] y_coord
);
  import fn_pkg::*;

  typedef enum logic {S_WAIT, S_CALC} state_e;
  state_e     state;
  logic [4:0] y_vel;
  logic [3:0] counter;
  logic       left;
  logic [10:0] y_down;

  assign y_down = {1'b0, y_coord} + {6'd0, y_vel};

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_WAIT;
      y_vel   <= '0;
      counter <= '0;
      left    <= 1'b0;
      x_coord <= '0;
      y_coord <= 10'(BOTTOM_Y);
    end else if (tick) begin
      case (state)
        S_WAIT: begin
          x_coord <= xcostart;
          y_coord <= ycostart;
          y_vel   <= yvel;
          counter <= '0;
          left    <= backwards;
          if (begincalc && !new_fruit) state <= S_CALC;
        end
        S_CALC: begin
          if (counter == 4'(VEL_PERIOD - 1)) begin
            counter <= '0;
            if (y_vel < 5'd30) y_vel <= y_vel + 5'd2;
          end else begin
            counter <= counter + 4'd1;
          end
          x_coord <= left ? x_coord - 10'(X_VEL) : x_coord + 10'(X_VEL);
          if (new_fruit) state <= S_WAIT;
          else if (y_down > 11'(BOTTOM_Y)) y_coord <= 10'(BOTTOM_Y);
          else y_coord <= y_down[9:0];
        end
        default: state <= S_WAIT;
      endcase
    end
  end
endmodule
