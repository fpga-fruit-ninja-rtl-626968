// tb_xvga: checks the XVGA raster: 1344 clocks per line, 806 lines per frame,
// visible 1024x768, hsync low for 136 clocks starting at hcount 1048, vsync
// low for 6 lines starting at line 777, and that hcount/vcount/flags agree.
module tb_xvga;
  logic clk = 0, rst = 1;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic hsync, vsync, blank;
  int checks = 0, failures = 0;

  xvga dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_vs_fall = -1, hs_low = 0, vs_low_lines = 0, frames = 0;
  logic prev_hs = 1, prev_vs = 1;

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    forever begin
      @(posedge clk);
      #1;
      cyc++;
      // flags must match the counters they accompany
      if (hcount == 11'd0 && vcount == 10'd0) check(!blank, "blank at 0,0");
      if (hcount == 11'd1024) check(blank, "blank at hcount 1024");
      if (vcount == 10'd768) check(blank, "blank at line 768");
      if (hcount == 11'd1023 && vcount == 10'd767) check(!blank, "last visible pixel");
      if (hcount == 11'd1048) check(!hsync, "hsync low at 1048");
      if (hcount == 11'd1047) check(hsync, "hsync high at 1047");
      if (hcount == 11'd1184) check(hsync, "hsync high at 1184");
      check(hcount < 11'd1344 && vcount < 10'd806, "counter range");
      if (!hsync) hs_low++;
      if (prev_hs == 0 && hsync == 1) begin
        check(hs_low == 136, $sformatf("hsync width %0d", hs_low));
        hs_low = 0;
      end
      if (prev_vs == 1 && vsync == 0) begin
        check(vcount == 10'd777 && hcount == 11'd0, "vsync start");
        if (last_vs_fall >= 0)
          check(cyc - last_vs_fall == 1344 * 806, $sformatf("frame period %0d", cyc - last_vs_fall));
        last_vs_fall = cyc;
        frames++;
      end
      if (prev_vs == 0 && vsync == 1) check(vcount == 10'd783, "vsync end");
      prev_hs = hsync;
      prev_vs = vsync;
      if (frames == 2 && vcount == 10'd790) break;
    end
    check(frames == 2, "two frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
