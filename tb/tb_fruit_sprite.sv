// tb_fruit_sprite: scans random pixels around a fruit and checks the drawn
// colour two clocks later: whole image when not sliced; when sliced, top
// half at (x,y) and bottom half (image rows H/2..H-1) at (xslice,yslice);
// nothing when inactive.  Also checks the stem/body difference that shows the
// bottom half reads the second half of the ROM.
module tb_fruit_sprite;
  import fn_pkg::*;
  localparam int W = 150, H = 150;
  logic clk = 0, active = 1, slice = 0;
  logic [10:0] hcount = 0;
  logic [9:0]  vcount = 0;
  logic [9:0]  x = 300, y = 200, xslice = 500, yslice = 400;
  pixel_t pixel;
  int checks = 0, failures = 0;

  fruit_sprite #(.IMG(IMG_APPLE), .WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pixel_t img(int c, int r);
    return image_color(IMG_APPLE, image_index(IMG_APPLE, W, H, c, r));
  endfunction

  function automatic pixel_t expect_px(int h, int v);
    int xi = int'(x), yi = int'(y), xs = int'(xslice), ys = int'(yslice);
    if (!active) return 0;
    if (!slice) begin
      if (h >= xi && h < xi + W && v >= yi && v < yi + H) return img(h - xi, v - yi);
      return 0;
    end
    if (h >= xi && h < xi + W && v >= yi && v < yi + H / 2) return img(h - xi, v - yi);
    if (h >= xs && h < xs + W && v >= ys && v < ys + H / 2) return img(h - xs, v - ys + H / 2);
    return 0;
  endfunction

  pixel_t want [$];
  int mode;

  task automatic drive(int h, int v);
    hcount = 11'(h); vcount = 10'(v);
    want.push_back(expect_px(h, v));
    @(posedge clk); #1;
    if (want.size() > 1) begin
      pixel_t w;
      w = want.pop_front();
      check(pixel == w, $sformatf("mode %0d got %h want %h", mode, pixel, w));
    end
  endtask

  initial begin
    for (mode = 0; mode < 4; mode++) begin
      slice  = (mode == 1 || mode == 3);
      active = (mode != 2);
      if (mode == 3) begin xslice = 320; yslice = 260; end   // halves overlap
      want.delete();
      for (int i = 0; i < 4000; i++)
        drive($urandom_range(250, 700), $urandom_range(150, 600));
    end
    // stem vs body: (75,5) of the top half is stem, (75,5) of the bottom half is row 80
    slice = 1; active = 1; x = 100; y = 100; xslice = 400; yslice = 400;
    want.delete();
    hcount = 11'd175; vcount = 10'd105;
    repeat (2) @(posedge clk);
    #1 check(pixel == 24'h40C040, "top half reads stem");
    hcount = 11'd475; vcount = 10'd405;
    repeat (2) @(posedge clk);
    #1 check(pixel == 24'hE02020, "bottom half reads body rows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
