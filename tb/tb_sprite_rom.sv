// tb_sprite_rom: reads known points of the apple image (centre = body
// colour, corner = transparent, top centre = stem colour) and random
// addresses, checking the two-clock read latency and row-major addressing.
module tb_sprite_rom;
  import fn_pkg::*;
  localparam int W = 150, H = 150;
  logic clk = 0;
  logic [14:0] addr = 0;
  pixel_t pixel;
  int checks = 0, failures = 0;

  sprite_rom #(.IMG(IMG_APPLE), .WIDTH(W), .HEIGHT(H)) dut (.*);

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

  initial begin
    int c, r;
    // fixed points: (col,row) -> colour
    int pc [4] = '{75, 0, 75, 75};
    int pr [4] = '{75, 0, 5, 120};
    pixel_t pw [4] = '{24'hE02020, 24'h000000, 24'h40C040, 24'hE02020};
    for (int i = 0; i < 4 + 2000; i++) begin
      if (i < 4) begin c = pc[i]; r = pr[i]; want.push_back(pw[i]); end
      else begin
        c = $urandom_range(0, W - 1); r = $urandom_range(0, H - 1);
        want.push_back(image_color(IMG_APPLE, image_index(IMG_APPLE, W, H, c, r)));
      end
      addr = 15'(c + r * W);
      @(posedge clk); #1;
      if (i >= 1) begin
        pixel_t w;
        w = want.pop_front();
        check(pixel == w, $sformatf("read %0d got %h want %h", i - 1, pixel, w));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
