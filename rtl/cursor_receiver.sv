// cursor_receiver: serial receiver for the handheld remote's cursor packets.
//
// The remote sends 5 bytes per update at 9600 baud, 8 data bits per byte,
// one start and one stop bit: x (2 bytes), y (2 bytes), button (1 byte, bit 0
// = select button).  Bits within a byte arrive most significant first; the
// 16-bit coordinates arrive low byte first.
//
// Timing is counted in sampling clocks of 16x the baud rate (SAMPLE_DIV
// system clocks each).  FSM:
//   HIGH    wait until the line has been high for HIGH_CYCLES clocks, so the
//           receiver never starts in the middle of a packet.
//   FALLING wait for a falling edge (start bit); restart the sampling clock.
//   FIRST   wait 8 sampling clocks to reach the middle of the start bit.
//   DATA    sample one bit every 16 sampling clocks; after 8 data bits wait
//           one more bit time (the stop bit), then go back to FALLING for the
//           next byte, re-centring on each start bit, or to DONE after the
//           fifth byte.
//   DONE    rebuild x, y and button from the 40 received bits, pulse `valid`.
// Outputs hold their last value between packets; after reset the cursor sits
// at (507, 379), the centre of the screen less half the cursor size.  The
// `valid` pulse is this design's addition.
module cursor_receiver #(
  parameter int CLK_HZ      = 65_000_000,
  parameter int BAUD        = 9600,
  parameter int HIGH_CYCLES = 1300,
  parameter int NUM_BYTES   = 5,
  localparam int SAMPLE_DIV = CLK_HZ / (16 * BAUD)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        serial_data,
  output logic [15:0] x_coord,
  output logic [15:0] y_coord,
  output logic [7:0]  button,
  output logic        valid
);
  typedef enum logic [2:0] {S_HIGH, S_FALLING, S_FIRST, S_DATA, S_DONE} state_e;
  state_e state;

  logic [$clog2(HIGH_CYCLES + 1)-1:0] high_cnt;
  logic [$clog2(SAMPLE_DIV)-1:0]      div;
  logic                               stick;
  logic [3:0]                         scnt;
  logic [3:0]                         nbits;
  logic [2:0]                         nbytes;
  logic [8*NUM_BYTES-1:0]             data;

  assign stick = (div == ($bits(div))'(SAMPLE_DIV - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_HIGH;
      high_cnt <= '0;
      div      <= '0;
      scnt     <= '0;
      nbits    <= '0;
      nbytes   <= '0;
      data     <= '0;
      x_coord  <= 16'd507;
      y_coord  <= 16'd379;
      button   <= '0;
      valid    <= 1'b0;
    end else begin
      valid <= 1'b0;
      div   <= stick ? '0 : div + 1'b1;
      case (state)
        S_HIGH: begin
          nbytes <= '0;
          if (high_cnt == ($bits(high_cnt))'(HIGH_CYCLES)) begin
            high_cnt <= '0;
            state    <= S_FALLING;
          end else if (serial_data) begin
            high_cnt <= high_cnt + 1'b1;
          end else begin
            high_cnt <= '0;
          end
        end
        S_FALLING: begin
          div  <= '0;
          scnt <= '0;
          if (!serial_data) state <= S_FIRST;
        end
        S_FIRST: if (stick) begin
          if (scnt == 4'd7) begin
            scnt  <= '0;
            nbits <= '0;
            state <= S_DATA;
          end else begin
            scnt <= scnt + 4'd1;
          end
        end
        S_DATA: if (stick) begin
          scnt <= scnt + 4'd1;
          if (scnt == 4'd15) begin
            if (nbits < 4'd8) begin
              data  <= {data[8*NUM_BYTES-2:0], serial_data};
              nbits <= nbits + 4'd1;
            end else if (nbytes == 3'(NUM_BYTES - 1)) begin
              state <= S_DONE;
            end else begin
              nbytes <= nbytes + 3'd1;
              state  <= S_FALLING;
            end
          end
        end
        S_DONE: begin
          x_coord  <= {data[31:24], data[39:32]};
          y_coord  <= {data[15:8],  data[23:16]};
          button   <= data[7:0];
          valid    <= 1'b1;
          high_cnt <= '0;
          state    <= S_HIGH;
        end
        default: state <= S_HIGH;
      endcase
    end
  end
endmodule
