// tb_cursor_receiver: a serial transmitter in the testbench sends 5-byte
// packets (x low, x high, y low, y high, button; each byte MSB first, one
// start and one stop bit) with irregular gaps between bytes, as the Bluetooth
// link produces.  Checks every decoded
// packet and that `valid` comes within one bit time after the last stop bit's
// middle.  The clock rate is scaled so that one bit lasts 128 clocks.
module tb_cursor_receiver;
  localparam int CLK_HZ = 16 * 9600 * 8;   // 8 clocks per sampling clock
  localparam int BIT    = 128;
  logic clk = 0, rst = 1, serial_data = 1;
  logic [15:0] x_coord, y_coord;
  logic [7:0]  button;
  logic        valid;
  int checks = 0, failures = 0;

  cursor_receiver #(.CLK_HZ(CLK_HZ), .BAUD(9600), .HIGH_CYCLES(20)) dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, valid_at = -1, last_start = 0;
  always @(posedge clk) begin
    cyc++;
    if (valid) valid_at = cyc;
  end

  task automatic send_byte(logic [7:0] b);
    last_start = cyc;
    serial_data = 0;
    repeat (BIT) @(posedge clk);
    for (int i = 7; i >= 0; i--) begin
      serial_data = b[i];
      repeat (BIT) @(posedge clk);
    end
    serial_data = 1;
    repeat (BIT) @(posedge clk);
  endtask

  initial begin
    logic [15:0] x, y;
    logic [7:0] bt;
    check(1, "start");
    repeat (3) @(posedge clk);
    rst = 0;
    check(x_coord == 16'd507 && y_coord == 16'd379, "reset position");
    repeat (3 * BIT) @(posedge clk);
    for (int p = 0; p < 25; p++) begin
      x = 16'($urandom_range(0, 1023)); y = 16'($urandom_range(0, 767));
      bt = 8'($urandom_range(0, 1));
      if (p == 0) begin x = 16'h1234; y = 16'hA5C3; bt = 8'h01; end
      valid_at = -1;
      send_byte(x[7:0]);  repeat ($urandom_range(0, 3 * BIT)) @(posedge clk);
      send_byte(x[15:8]); repeat ($urandom_range(0, 3 * BIT)) @(posedge clk);
      send_byte(y[7:0]);  repeat ($urandom_range(0, 3 * BIT)) @(posedge clk);
      send_byte(y[15:8]); repeat ($urandom_range(0, 3 * BIT)) @(posedge clk);
      send_byte(bt);
      repeat (BIT) @(posedge clk);
      check(x_coord == x && y_coord == y && button == bt,
            $sformatf("packet %0d got %h %h %h want %h %h %h", p, x_coord, y_coord, button, x, y, bt));
      check(valid_at - last_start >= 9 * BIT && valid_at - last_start <= 10 * BIT,
            $sformatf("packet %0d valid at %0d clocks after last start bit", p, valid_at - last_start));
      repeat ($urandom_range(1, 20) * BIT) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
