// lookup_table: launch parameters of a fruit or bomb from 3 random bits.
//
// A registered 8-entry table maps `random_number` to the initial upward
// speed (pixels per frame; always even so that subtracting the gravity step of
// 2 reaches exactly zero at the top of the arc), the initial x coordinate and
// the horizontal direction (`backwards` = 1 moves left).  BOMB selects the
// bomb's own table.  The table entries are the game's hand-picked values.
// Output changes on the clock edge after `en` (once per frame in the game).
module lookup_table #(
  parameter bit BOMB = 1'b0
) (
  input  logic       clk,
  input  logic       en,
  input  logic [2:0] random_number,
  output logic [4:0] yvel,
  output logic       backwards,
  output logic [9:0] xcostart
);
  typedef struct packed {
    logic [4:0] yvel;
    logic [9:0] x;
    logic       back;
  } entry_t;

  function automatic entry_t fruit_entry(logic [2:0] i);
    case (i)
      3'd0: return '{5'd16, 10'd100, 1'b1};
      3'd1: return '{5'd12, 10'd200, 1'b0};
      3'd2: return '{5'd16, 10'd300, 1'b0};
      3'd3: return '{5'd14, 10'd400, 1'b0};
      3'd4: return '{5'd10, 10'd500, 1'b1};
      3'd5: return '{5'd14, 10'd600, 1'b0};
      3'd6: return '{5'd14, 10'd250, 1'b1};
      default: return '{5'd14, 10'd300, 1'b1};
    endcase
  endfunction

  function automatic entry_t bomb_entry(logic [2:0] i);
    case (i)
      3'd0: return '{5'd16, 10'd500, 1'b0};
      3'd1: return '{5'd14, 10'd400, 1'b0};
      3'd2: return '{5'd16, 10'd200, 1'b1};
      3'd3: return '{5'd14, 10'd300, 1'b0};
      3'd4: return '{5'd10, 10'd300, 1'b0};
      3'd5: return '{5'd14, 10'd510, 1'b1};
      default: return '{5'd14, 10'd300, 1'b0};
    endcase
  endfunction

  entry_t e;
  assign e = BOMB ? bomb_entry(random_number) : fruit_entry(random_number);

  always_ff @(posedge clk) begin
    if (en) begin
      yvel      <= e.yvel;
      xcostart  <= e.x;
      backwards <= e.back;
    end
  end
endmodule
