// tb_random_bits_generator: compares the register with a bitwise CRC-16
// (polynomial 0x8005, MSB first, initial value 0xFFFF) computed in the
// testbench, and checks that the register holds while `en` is low.
module tb_random_bits_generator;
  logic clk = 0, rst = 1, en = 0, data = 0;
  logic [15:0] random_number;
  logic [15:0] model;
  int checks = 0, failures = 0;

  random_bits_generator dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    model = 16'hFFFF;
    check(random_number == 16'hFFFF, "reset value");
    for (int i = 0; i < 500; i++) begin
      en   = ($urandom_range(0, 3) != 0);
      data = 1'($urandom);
      @(posedge clk); #1;
      if (en) model = (model[15] ^ data) ? ((model << 1) ^ 16'h8005) : (model << 1);
      check(random_number == model, $sformatf("step %0d got %h want %h", i, random_number, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
