// tb_picture_blob: random pixels around a bomb bitmap, checked two clocks
// later against the image, with fixed points for the shell and fuse colours
// and nothing drawn while inactive.
module tb_picture_blob;
  import fn_pkg::*;
  localparam int W = 150, H = 150;
  logic clk = 0, active = 1;
  logic [10:0] hcount = 0, x = 400;
  logic [9:0]  vcount = 0, y = 300;
  pixel_t pixel;
  int checks = 0, failures = 0;

  picture_blob #(.IMG(IMG_BOMB), .WIDTH(W), .HEIGHT(H)) dut (.*);

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

  pixel_t want [$];

  task automatic drive(int h, int v, pixel_t w);
    hcount = 11'(h); vcount = 10'(v);
    want.push_back(w);
    @(posedge clk); #1;
    if (want.size() > 1) begin
      pixel_t e;
      e = want.pop_front();
      check(pixel == e, $sformatf("got %h want %h at %0d,%0d", pixel, e, h, v));
    end
  endtask

  initial begin
    int h, v;
    drive(475, 375, 24'h303030);       // centre: shell
    drive(403, 303, 24'hFFE000);       // corner: fuse
    drive(399, 303, 24'h000000);       // left of the picture
    drive(403, 450, 24'h000000);       // below the picture
    for (int i = 0; i < 3000; i++) begin
      h = $urandom_range(350, 600); v = $urandom_range(250, 500);
      if (i == 1500) active = 0;
      drive(h, v, (active && h >= 400 && h < 550 && v >= 300 && v < 450) ?
                   image_color(IMG_BOMB, image_index(IMG_BOMB, W, H, h - 400, v - 300)) : 24'h0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
