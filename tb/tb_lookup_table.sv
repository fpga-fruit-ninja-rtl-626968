// tb_lookup_table: checks every entry of the fruit and bomb launch tables and
// that outputs hold while `en` is low.
module tb_lookup_table;
  logic clk = 0, en = 0;
  logic [2:0] rn;
  logic [4:0] fy, by;
  logic fb, bb;
  logic [9:0] fx, bx;
  int checks = 0, failures = 0;

  lookup_table #(.BOMB(1'b0)) fruit (.clk(clk), .en(en), .random_number(rn),
                                     .yvel(fy), .backwards(fb), .xcostart(fx));
  lookup_table #(.BOMB(1'b1)) bomb  (.clk(clk), .en(en), .random_number(rn),
                                     .yvel(by), .backwards(bb), .xcostart(bx));

  always #5 clk = !clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fv [8] = '{16, 12, 16, 14, 10, 14, 14, 14};
  int fxs[8] = '{100, 200, 300, 400, 500, 600, 250, 300};
  int fbk[8] = '{1, 0, 0, 0, 1, 0, 1, 1};
  int bv [8] = '{16, 14, 16, 14, 10, 14, 14, 14};
  int bxs[8] = '{500, 400, 200, 300, 300, 510, 300, 300};
  int bbk[8] = '{0, 0, 1, 0, 0, 1, 0, 0};

  initial begin
    for (int i = 0; i < 8; i++) begin
      rn = 3'(i); en = 1;
      @(posedge clk); #1;
      check(fy == 5'(fv[i]) && fx == 10'(fxs[i]) && fb == fbk[i][0], $sformatf("fruit entry %0d", i));
      check(by == 5'(bv[i]) && bx == 10'(bxs[i]) && bb == bbk[i][0], $sformatf("bomb entry %0d", i));
      check(fy[0] == 1'b0 && by[0] == 1'b0, "speeds are even");
      en = 0; rn = 3'(7 - i);
      @(posedge clk); #1;
      check(fy == 5'(fv[i]) && fx == 10'(fxs[i]), $sformatf("hold %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
