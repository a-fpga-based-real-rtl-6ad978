// gra_mag_comp_tb: exhaustive test of the threshold-table gradient magnitude.
// Every pair dx, dy in -255..255 is applied and the output compared with
// round(sqrt(dx^2 + dy^2)) from the real square root, saturated at 128.
module gra_mag_comp_tb;
  import oc_pkg::*;

  logic signed [GRAD_W-1:0] dx, dy;
  logic [MAG_W-1:0] gm;
  int checks = 0, failures = 0;

  gra_mag_comp dut (.dx, .dy, .gm);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_sat = 0;
    for (int x = -255; x <= 255; x++)
      for (int y = -255; y <= 255; y++) begin
        int s, e;
        dx = GRAD_W'(x);
        dy = GRAD_W'(y);
        #1;
        s = x * x + y * y;
        e = int'($floor($sqrt(real'(s)) + 0.5));
        if (e > 128) begin e = 128; n_sat++; end
        checks++;
        if (int'(gm) != e) begin
          failures++;
          if (failures < 10) $display("FAIL: dx=%0d dy=%0d gm=%0d expected %0d", x, y, gm, e);
        end
      end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
