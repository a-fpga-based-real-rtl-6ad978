// hist_create_tb: random streams of (bin, magnitude) updates, with and
// without 'acc', are mirrored in a testbench histogram and all 36 bins
// compared after every clock; 'clear' (also together with 'acc') must empty
// every bin. A narrow 10-bit instance checks that bins saturate.
module hist_create_tb;
  import oc_pkg::*;

  localparam int HW = 16, HN = 10;

  logic clk = 0, rst_n = 0;
  logic clear, acc, clear_n, acc_n;
  logic [BIN_W-1:0] bin, bin_n;
  logic [MAG_W-1:0] gm, gm_n;
  logic [HW-1:0] hist [NBINS];
  logic [HN-1:0] hist_n [NBINS];
  int model [NBINS], model_n [NBINS];
  int checks = 0, failures = 0, n_sat = 0;

  always #5 clk = ~clk;

  hist_create #(.HIST_W(HW)) dut (.clk, .rst_n, .clear, .acc, .bin, .gm, .hist);
  hist_create #(.HIST_W(HN)) dut_n (.clk, .rst_n, .clear(clear_n), .acc(acc_n),
                                    .bin(bin_n), .gm(gm_n), .hist(hist_n));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; acc = 0; bin = 0; gm = 0;
    clear_n = 0; acc_n = 0; bin_n = 0; gm_n = 0;
    foreach (model[b]) begin model[b] = 0; model_n[b] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 199) == 0);
      acc   = $urandom_range(0, 3) != 0;
      bin   = BIN_W'($urandom_range(0, NBINS - 1));
      gm    = MAG_W'($urandom_range(0, 128));
      clear_n = (t % 3000 == 2999);
      acc_n   = 1;
      bin_n   = BIN_W'($urandom_range(0, 3));
      gm_n    = MAG_W'($urandom_range(0, 128));
      if (clear) foreach (model[b]) model[b] = 0;
      else if (acc) model[bin] += int'(gm);
      if (clear_n) foreach (model_n[b]) model_n[b] = 0;
      else begin
        model_n[bin_n] += int'(gm_n);
        if (model_n[bin_n] > 1023) begin model_n[bin_n] = 1023; n_sat++; end
      end
      @(posedge clk);
      #1;
      for (int b = 0; b < NBINS; b++) begin
        checks += 2;
        if (int'(hist[b]) != model[b]) begin
          failures++;
          if (failures < 10) $display("FAIL: t=%0d bin %0d = %0d expected %0d", t, b, hist[b], model[b]);
        end
        if (int'(hist_n[b]) != model_n[b]) begin
          failures++;
          if (failures < 10) $display("FAIL: narrow t=%0d bin %0d = %0d expected %0d", t, b, hist_n[b], model_n[b]);
        end
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
