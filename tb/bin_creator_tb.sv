// bin_creator_tb: for every first-quadrant bin q and every sign case, the
// 36-way bin must be the bin of a representative angle: phi = 10q + 5 degrees
// placed in the quadrant given by the signs (theta = phi, 180 - phi,
// 180 + phi, 360 - phi), plus the four axis directions and the zero vector.
module bin_creator_tb;
  import oc_pkg::*;

  logic [QBIN_W-1:0] qbin;
  logic dx_neg, dx_zero, dy_neg, dy_zero;
  logic [BIN_W-1:0] bin;
  int checks = 0, failures = 0;

  bin_creator dut (.qbin, .dx_neg, .dx_zero, .dy_neg, .dy_zero, .bin);

  task automatic apply(input int q, input bit xn, xz, yn, yz, input int e);
    qbin = QBIN_W'(q);
    dx_neg = xn; dx_zero = xz; dy_neg = yn; dy_zero = yz;
    #1;
    checks++;
    if (int'(bin) != e) begin
      failures++;
      $display("FAIL: q=%0d signs=%b%b%b%b bin=%0d expected %0d", q, xn, xz, yn, yz, bin, e);
    end
  endtask

  initial begin : watchdog
    #100_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q <= 8; q++) begin
      automatic real phi = 10.0 * q + 5.0;
      apply(q, 0, 0, 0, 0, int'($floor(phi / 10.0)));            // dx>0, dy>0
      apply(q, 1, 0, 0, 0, int'($floor((180.0 - phi) / 10.0)));  // dx<0, dy>0
      apply(q, 1, 0, 1, 0, int'($floor((180.0 + phi) / 10.0)));  // dx<0, dy<0
      apply(q, 0, 0, 1, 0, int'($floor((360.0 - phi) / 10.0)));  // dx>0, dy<0
    end
    // axes: dy = 0 gives q = 0, dx = 0 gives q = 8
    apply(0, 0, 0, 0, 1, 0);    // 0 degrees
    apply(8, 0, 1, 0, 0, 9);    // 90 degrees
    apply(0, 1, 0, 0, 1, 18);   // 180 degrees
    apply(8, 0, 1, 1, 0, 27);   // 270 degrees
    apply(8, 0, 1, 0, 1, 0);    // zero vector
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
