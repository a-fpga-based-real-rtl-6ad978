// bin_select_tb: every gradient dx, dy in -255..255 against floor(theta/10)
// with theta = atan2(dy, dx) in 0..360 degrees from the real arctangent.
// Gradients within 0.05 degree of a bin edge are skipped, as the tangent
// constants move the edges by up to 0.03 degree; all skipped ones must land
// in one of the two bins at that edge.
module bin_select_tb;
  import oc_pkg::*;

  logic signed [GRAD_W-1:0] dx, dy;
  logic [NTHD-1:0] a;
  logic [BIN_W-1:0] bin;
  int checks = 0, failures = 0;

  bin_select dut (.dx, .dy, .a, .bin);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int near = 0;
    for (int x = -255; x <= 255; x++)
      for (int y = -255; y <= 255; y++) begin
        real th, fr;
        int e;
        if (x == 0 && y == 0) continue;
        dx = GRAD_W'(x);
        dy = GRAD_W'(y);
        #1;
        th = $atan2(real'(y), real'(x)) * 180.0 / 3.14159265358979;
        if (th < 0.0) th += 360.0;
        e = int'($floor(th / 10.0)) % 36;
        fr = th - 10.0 * $floor(th / 10.0);
        checks++;
        if (fr < 0.05 || fr > 9.95) begin
          automatic int lo = int'($floor((th + 0.05) / 10.0)) % 36;
          automatic int hi = (lo + 35) % 36;
          near++;
          if (int'(bin) != lo && int'(bin) != hi) begin
            failures++;
            if (failures < 10) $display("FAIL: edge dx=%0d dy=%0d bin=%0d", x, y, bin);
          end
        end else if (int'(bin) != e) begin
          failures++;
          if (failures < 10) $display("FAIL: dx=%0d dy=%0d theta=%f bin=%0d expected %0d", x, y, th, bin, e);
        end
      end
    $display("%0d gradients at a bin edge", near);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
