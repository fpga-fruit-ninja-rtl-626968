// slice_dealer: decides when the cursor has sliced a fruit.
//
// One two-state FSM per fruit (apple, orange, peach), clocked at the pixel
// clock.  WAIT -> SLICE when, on the same pixel, both the cursor pixel and the
// fruit pixel are non-zero (the cursor is drawn over the fruit) and the fruit
// is active.  SLICE -> WAIT when a new, active fruit is launched (`*_new` and
// `*_active`).  `*_sliced` is high exactly while the FSM is in SLICE, so it is
// a level that lasts for the rest of the fruit's flight; it rises the cycle
// after the overlapping pixel.  Requiring `active` in WAIT is stated by the
// game (inactive fruit cannot be sliced); inactive fruit also draw nothing.
module slice_dealer (
  input  logic          clk,
  input  logic          rst,
  input  logic [2:0]    active,     // {peach, orange, apple}
  input  logic [2:0]    fruit_new,  // {peach, orange, apple}
  input  fn_pkg::pixel_t cursorpix,
  input  fn_pkg::pixel_t applepix,
  input  fn_pkg::pixel_t orangepix,
  input  fn_pkg::pixel_t peachpix,
  output logic [2:0]    sliced      // {peach, orange, apple}
);
  logic [2:0] overlap;
  assign overlap = {|peachpix, |orangepix, |applepix} & {3{|cursorpix}};

  always_ff @(posedge clk) begin
    if (rst) begin
      sliced <= '0;
    end else begin
      for (int i = 0; i < 3; i++) begin
        if (!sliced[i]) begin
          if (overlap[i] && active[i]) sliced[i] <= 1'b1;
        end else if (fruit_new[i] && active[i]) begin
          sliced[i] <= 1'b0;
        end
      end
    end
  end
endmodule
