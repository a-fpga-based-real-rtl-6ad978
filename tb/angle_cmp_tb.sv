// angle_cmp_tb: threshold signals and the first-quadrant bin. For random
// |dy| and random rising threshold sets, a(k) must equal 256*|dy| >= thd[k]
// and the bin must be the number of leading ones of a1..a8 (the bin table).
// Thresholds placed exactly at 256*|dy| check the inclusive lower bound.
module angle_cmp_tb;
  import oc_pkg::*;

  logic [ABS_W-1:0]  abs_dy;
  logic [THD_W-1:0]  thd [NTHD];
  logic [NTHD-1:0]   a;
  logic [QBIN_W-1:0] qbin;
  int checks = 0, failures = 0;
  int hist [9];

  angle_cmp dut (.abs_dy, .thd, .a, .qbin);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[i]) hist[i] = 0;
    for (int t = 0; t < 20000; t++) begin
      int base, e;
      abs_dy = ABS_W'($urandom_range(0, 255));
      base = $urandom_range(0, 255 * 256);
      for (int k = 0; k < 8; k++) begin
        base += $urandom_range(0, 20000);
        thd[k] = THD_W'(base);
      end
      if (t % 7 == 0) thd[t % 8] = THD_W'(int'(abs_dy) * 256);
      // keep the set rising
      for (int k = 1; k < 8; k++) if (thd[k] < thd[k-1]) thd[k] = thd[k-1];
      #1;
      e = 0;
      while (e < 8 && int'(abs_dy) * 256 >= int'(thd[e])) e++;
      hist[e]++;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (a[k] != (int'(abs_dy) * 256 >= int'(thd[k]))) failures++;
      end
      checks++;
      if (int'(qbin) != e) begin
        failures++;
        if (failures < 10) $display("FAIL: dy=%0d qbin=%0d expected %0d", abs_dy, qbin, e);
      end
    end
    foreach (hist[i]) begin
      checks++;
      if (hist[i] == 0) begin failures++; $display("FAIL: bin %0d never produced", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
