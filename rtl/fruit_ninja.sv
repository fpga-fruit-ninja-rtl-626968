// fruit_ninja: top level of the FPGA Fruit Ninja game.
//
// Two clock domains.  The 65 MHz pixel clock runs the video timing (xvga),
// the game (game_fsm) and the buzzer (sfx).  The 27 MHz clock runs the high
// score keeper (max_score), which talks to an external flash controller
// through the flash_* ports; that controller and the flash chip are outside
// this design.  Signals crossing between the domains:
//   game over flag and score, 65 -> 27 MHz: three registers (slower);
//   high score, 27 -> 65 MHz: two registers (quasi-static value);
//   flash busy, 27 -> 65 MHz: two registers, for the sound effects.
// The remote's serial line passes three registers before use.  The Enter
// button, debounced, sends the game back to its start screen; the Up button
// (active low) clears the stored high score.  A 16-cycle power-on reset
// initialises each domain: a shift register whose declaration gives its
// power-up value (all ones, loaded by the FPGA configuration) and which then
// shifts in zeros; lint reports this initial value on a process-assigned
// register, and it stands because it is the reset source itself.
//
// VGA outputs are registered: hsync/vsync/blank are delayed by two clocks to
// match the two-clock pixel latency of the drawing pipeline.  LEDs are active
// low: led[7] high-score jingle pending, led[6] flash busy, led[5] game over.
// Parameters other than the defaults only shorten simulations: VEL_PERIOD
// (frames per gravity step), BAUD_CLK_HZ (clock rate the serial receiver
// assumes), DEBOUNCE_DELAY, READ_HOLD and SFX_DIV (divides every sound
// duration).  The 65 MHz clock is made from 27 MHz by a clock manager in the
// original board design; here both clocks are inputs.
module fruit_ninja #(
  parameter int VEL_PERIOD     = 9,
  parameter int BAUD_CLK_HZ    = 65_000_000,
  parameter int DEBOUNCE_DELAY = 650_000,
  parameter int READ_HOLD      = 200,
  parameter int SFX_DIV        = 1
) (
  input  logic        clk_65mhz,
  input  logic        clk_27mhz,
  input  logic        button_enter,   // active low
  input  logic        button_up,      // active low
  input  logic        serial_in,      // from the Bluetooth receiver
  // external flash controller (27 MHz domain)
  input  logic        flash_busy,
  input  logic [15:0] flash_rdata,
  output logic        flash_reading,
  output logic        flash_writing,
  output logic        flash_reset,
  output logic        flash_up_reset,
  output logic [15:0] flash_wdata,
  // VGA
  output logic [7:0]  vga_red,
  output logic [7:0]  vga_green,
  output logic [7:0]  vga_blue,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        vga_blank_b,
  // buzzer and LEDs
  output logic        sound,
  output logic [7:0]  led
);
  import fn_pkg::*;

  // ---------------------------------------------------------------- resets
  logic [15:0] por65 = 16'hFFFF;
  logic [15:0] por27 = 16'hFFFF;
  logic        rst65, rst27;

  always_ff @(posedge clk_65mhz) por65 <= {por65[14:0], 1'b0};
  always_ff @(posedge clk_27mhz) por27 <= {por27[14:0], 1'b0};
  assign rst65 = por65[15];
  assign rst27 = por27[15];

  logic user_reset;
  debounce #(.DELAY(DEBOUNCE_DELAY)) db (
    .clk(clk_65mhz), .rst(rst65), .noisy(!button_enter), .clean(user_reset));

  // ---------------------------------------------------------------- video
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;

  xvga timing (.clk(clk_65mhz), .rst(rst65), .hcount(hcount), .vcount(vcount),
               .hsync(hsync), .vsync(vsync), .blank(blank));

  logic [2:0] serial_q;
  always_ff @(posedge clk_65mhz) serial_q <= {serial_q[1:0], serial_in};

  // ---------------------------------------------------------------- game
  pixel_t     pixel;
  logic [7:0] ultimate_score, highscore65;
  logic [7:0] hs_q1;
  logic       game_state, apple_slice, orange_slice, peach_slice, bomb_slice;
  logic [1:0] fell, state;

  game_fsm #(.VEL_PERIOD(VEL_PERIOD), .CLK_HZ(BAUD_CLK_HZ)) game (
    .clk(clk_65mhz), .rst(rst65), .vsync(vsync), .hcount(hcount), .vcount(vcount),
    .serial_data(serial_q[2]), .highscore(highscore65), .resetbutton(user_reset),
    .pixel(pixel), .ultimate_score(ultimate_score), .game_state(game_state),
    .apple_slice(apple_slice), .orange_slice(orange_slice), .peach_slice(peach_slice),
    .bomb_slice(bomb_slice), .fell_out(fell), .state_out(state));

  logic [1:0] hs_d, vs_d, b_d;
  always_ff @(posedge clk_65mhz) begin
    hs_d <= {hs_d[0], hsync};
    vs_d <= {vs_d[0], vsync};
    b_d  <= {b_d[0], blank};
    {vga_red, vga_green, vga_blue} <= pixel;
    vga_hsync   <= hs_d[1];
    vga_vsync   <= vs_d[1];
    vga_blank_b <= !b_d[1];
  end

  // ---------------------------------------------------------------- high score (27 MHz)
  logic        ready27;
  logic [15:0] score27, high27;
  logic [1:0]  up_q;
  logic [2:0]  ms_state;

  slower slow (.clk(clk_27mhz), .r_in(game_state), .c_in({8'd0, ultimate_score}),
               .r(ready27), .c(score27));

  always_ff @(posedge clk_27mhz) up_q <= {up_q[0], !button_up};

  max_score #(.READ_HOLD(READ_HOLD)) keeper (
    .clk(clk_27mhz), .rst(rst27), .current_score(score27),
    .score_from_flash(flash_rdata), .ready(ready27), .busy(flash_busy),
    .reset_score(up_q[1]), .flash_reset(flash_reset), .writing(flash_writing),
    .reading(flash_reading), .up_reset(flash_up_reset), .score(high27),
    .score_to_store(flash_wdata), .state_out(ms_state));

  always_ff @(posedge clk_65mhz) begin
    hs_q1       <= high27[7:0];
    highscore65 <= hs_q1;
  end

  // ---------------------------------------------------------------- sound
  logic [1:0] busy_q;
  logic       jingle;
  always_ff @(posedge clk_65mhz) busy_q <= {busy_q[0], flash_busy};

  sfx #(
    .FRUIT_CYCLES(6_500_000 / SFX_DIV),  .FRUIT_HALF(30_000 / SFX_DIV),
    .BOMB_CYCLES(30_000_000 / SFX_DIV),  .BOMB_HALF(150_000 / SFX_DIV),
    .LIFE_CYCLES(6_500_000 / SFX_DIV),   .LIFE_HALF(150_000 / SFX_DIV),
    .HS0_CYCLES(30_000_000 / SFX_DIV),   .HS1_CYCLES(15_000_000 / SFX_DIV),
    .HS1_HALF(110_670 / SFX_DIV),        .HS2_CYCLES(3_000_000 / SFX_DIV),
    .HS2_HALF(82_909 / SFX_DIV)
  ) sounds (
    .clk(clk_65mhz), .rst(rst65), .apple_slice(apple_slice), .orange_slice(orange_slice),
    .peach_slice(peach_slice), .bomb_slice(bomb_slice), .lost_life(fell),
    .busy(busy_q[1]), .state_in(state), .sound(sound), .r(jingle));

  assign led = {!jingle, !flash_busy, !game_state, 5'b11111};

  logic unused;
  assign unused = ^{high27[15:8], ms_state};
endmodule
