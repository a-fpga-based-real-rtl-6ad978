// add_ctrl_unit_tb: window scans on a 20x15 image with a 3-pixel radius.
// For centres inside, at corners and on edges, every step must give the
// next raster position's clamped address, the in-image flag (pixel at least
// one pixel away from every edge) and 'last' only on the final pixel. During
// 'load' the outputs must already show the first pixel of the new window.
module add_ctrl_unit_tb;
  import oc_pkg::*;

  localparam int W = 20, H = 15, R = 3, AW = 20, GB = 100;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  pos_t center;
  logic [AW-1:0] addr;
  logic in_img, last;
  int checks = 0, failures = 0, n_out = 0;

  always #5 clk = ~clk;

  add_ctrl_unit #(.IMG_W(W), .IMG_H(H), .WIN_R(R), .ADDR_W(AW), .GAUSS_BASE(GB)) dut (
    .clk, .rst_n, .load, .step, .center, .addr, .in_img, .last);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic scan(input int cx, input int cy);
    @(negedge clk);
    center.x = XW'(cx);
    center.y = YW'(cy);
    load = 1;
    #1;
    begin
      int fx = cx - R < 0 ? 0 : cx - R;
      int fy = cy - R < 0 ? 0 : cy - R;
      checks++;
      if (int'(addr) != GB + fy * W + fx || in_img != (cx - R >= 1 && cy - R >= 1) || last) begin
        failures++;
        $display("FAIL: c=(%0d,%0d) first address during load %0d", cx, cy, addr);
      end
    end
    @(negedge clk);
    load = 0;
    for (int y = cy - R; y <= cy + R; y++)
      for (int x = cx - R; x <= cx + R; x++) begin
        int ex = x < 0 ? 0 : x > W - 1 ? W - 1 : x;
        int ey = y < 0 ? 0 : y > H - 1 ? H - 1 : y;
        bit ein = x >= 1 && x <= W - 2 && y >= 1 && y <= H - 2;
        bit el = x == cx + R && y == cy + R;
        if (!ein) n_out++;
        checks++;
        if (int'(addr) != GB + ey * W + ex || in_img != ein || last != el) begin
          failures++;
          if (failures < 10)
            $display("FAIL: c=(%0d,%0d) p=(%0d,%0d) addr=%0d in=%0d last=%0d", cx, cy, x, y, addr, in_img, last);
        end
        step = 1;
        @(negedge clk);
        step = 0;
      end
  endtask

  initial begin
    center = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    scan(10, 7);
    scan(0, 0);
    scan(W - 1, H - 1);
    scan(2, 13);
    scan(18, 1);
    for (int i = 0; i < 20; i++) scan($urandom_range(0, W - 1), $urandom_range(0, H - 1));
    checks++;
    if (n_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
