// max_select_tb: random histograms, many built with one or two planted
// peaks, against a testbench model: first orientation = highest bin (lowest
// index on a tie); second = highest other bin that is above both circular
// neighbours and at least 80 % of the highest. Cases with and without a
// second orientation, and peaks at the 0/35 wrap, must all occur.
module max_select_tb;
  import oc_pkg::*;

  localparam int HW = 16;

  logic [HW-1:0] hist [NBINS];
  logic [BIN_W-1:0] bin1, bin2;
  logic [HW-1:0] val1;
  logic has2;
  int checks = 0, failures = 0;
  int n_two = 0, n_one = 0, n_wrap = 0;

  max_select #(.HIST_W(HW)) dut (.hist, .bin1, .val1, .has2, .bin2);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int m, b1, b2, v2;
      automatic int mode = t % 4;
      for (int b = 0; b < NBINS; b++)
        hist[b] = HW'(mode == 3 ? $urandom_range(0, 3) : $urandom_range(0, 3000));
      if (mode == 1 || mode == 2) begin
        automatic int p = $urandom_range(0, 35), q = $urandom_range(0, 35);
        automatic int hv = $urandom_range(4000, 20000);
        hist[p] = HW'(hv);
        hist[q] = HW'(mode == 1 ? hv * $urandom_range(75, 100) / 100 : hv / 2);
      end
      #1;
      b1 = 0; m = hist[0];
      for (int b = 1; b < NBINS; b++) if (int'(hist[b]) > m) begin m = hist[b]; b1 = b; end
      b2 = -1; v2 = -1;
      for (int b = 0; b < NBINS; b++) begin
        automatic int l = hist[(b + 35) % 36], r = hist[(b + 1) % 36], h = hist[b];
        if (b != b1 && h > l && h > r && real'(h) >= 0.8 * real'(m) && h > v2) begin
          b2 = b; v2 = h;
        end
      end
      if (b2 >= 0) n_two++; else n_one++;
      if (b2 == 0 || b2 == 35 || b1 == 0 || b1 == 35) n_wrap++;
      checks++;
      if (int'(bin1) != b1 || int'(val1) != m || has2 != (b2 >= 0) ||
          (b2 >= 0 && int'(bin2) != b2)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: t=%0d got %0d/%0d/%0d/%0d expected %0d/%0d/%0d/%0d",
                   t, bin1, val1, has2, bin2, b1, m, b2 >= 0, b2);
      end
    end
    checks += 3;
    if (n_two == 0) failures++;
    if (n_one == 0) failures++;
    if (n_wrap == 0) failures++;
    $display("two %0d one %0d wrap %0d", n_two, n_one, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
