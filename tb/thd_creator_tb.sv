// thd_creator_tb: the eight shift-and-add thresholds against |dx| times the
// tangent constants (multiplied here), for every |dx| in 0..255, and the
// constants themselves against the true tangents (error below 0.05 degree).
module thd_creator_tb;
  import oc_pkg::*;

  logic [ABS_W-1:0] abs_dx;
  logic [THD_W-1:0] thd [NTHD];
  int checks = 0, failures = 0;
  int tanq [8] = '{45, 93, 148, 215, 305, 444, 703, 1452};

  thd_creator dut (.abs_dx, .thd);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      automatic real deg = $atan(real'(tanq[k]) / 256.0) * 180.0 / 3.14159265358979;
      checks++;
      if (deg - 10.0 * (k + 1) > 0.05 || deg - 10.0 * (k + 1) < -0.05) begin
        failures++;
        $display("FAIL: constant %0d gives %f degrees", k, deg);
      end
    end
    for (int v = 0; v < 256; v++) begin
      abs_dx = ABS_W'(v);
      #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (int'(thd[k]) != v * tanq[k]) begin
          failures++;
          if (failures < 10) $display("FAIL: |dx|=%0d k=%0d thd=%0d expected %0d", v, k, thd[k], v * tanq[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
