// oc_top_tb: end-to-end test of the orientation accelerator at its default
// size (640x480 Gaussian image, 13x13 window, one frame of 1000 feature
// points).
//
// The testbench draws an image made of noise with planted linear ramps and a
// few saturating edges, stores it as neighbour words in a memory model,
// places the feature points (inside ramps, in noise and on the image border)
// and runs the accelerator. A reference model computes each feature point's
// histogram with plain arithmetic (real square root, tangent constants
// multiplied rather than shifted) and its one or two orientations, and every
// result record is compared. It also checks the clock count of each feature
// point (3*169 + one per orientation) and that each mechanism occurred:
// two orientations, one orientation, window pixels off the image, magnitude
// saturation and gradients in all four quadrants.
module oc_top_tb;
  import oc_pkg::*;

  localparam int IMG_W = 640, IMG_H = 480, WIN_R = 6;
  localparam int ADDR_W = 20, FP_BASE = 'h80000, OUT_BASE = 'hC0000;
  localparam int N_FP = 1000;
  localparam int WIN = 2 * WIN_R + 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] fp_count;
  logic busy, done;
  logic [16:0] rec_count;
  logic [ADDR_W-1:0] a_addr, b_addr;
  logic a_re, a_we, b_re;
  logic [35:0] a_wdata, a_rdata, b_rdata;

  always #5 clk = ~clk;

  oc_top dut (
    .clk, .rst_n, .start, .fp_count, .busy, .done, .rec_count,
    .mem_a_addr(a_addr), .mem_a_re(a_re), .mem_a_we(a_we),
    .mem_a_wdata(a_wdata), .mem_a_rdata(a_rdata),
    .mem_b_addr(b_addr), .mem_b_re(b_re), .mem_b_rdata(b_rdata)
  );

  ddr2_dp_model #(.ADDR_W(ADDR_W)) u_mem (
    .clk,
    .a_addr, .a_re, .a_we, .a_wdata, .a_rdata,
    .b_addr, .b_re, .b_we(1'b0), .b_wdata('0), .b_rdata
  );

  int checks = 0, failures = 0;
  int cycles = 0;
  int n_two = 0, n_one = 0, n_border = 0, n_sat = 0;
  int quad [4] = '{0, 0, 0, 0};

  byte unsigned img [IMG_H][IMG_W];
  int fpx [N_FP], fpy [N_FP];
  int exp_bin1 [N_FP], exp_bin2 [N_FP];
  bit exp_two [N_FP];

  // tan(10k deg) in 3.8 fixed point, as integers
  int tanq [8] = '{45, 93, 148, 215, 305, 444, 703, 1452};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int clamp8(int v);
    return v < 0 ? 0 : v > 255 ? 255 : v;
  endfunction

  function automatic int ref_mag(int dx, int dy);
    int s = dx * dx + dy * dy;
    int r = int'($floor($sqrt(real'(s)) + 0.5));
    if (r > 128) begin
      n_sat++;
      r = 128;
    end
    return r;
  endfunction

  function automatic int ref_bin(int dx, int dy);
    int ax = dx < 0 ? -dx : dx;
    int ay = dy < 0 ? -dy : dy;
    int q = 0;
    for (int k = 0; k < 8; k++) if (ay * 256 >= ax * tanq[k]) q = k + 1;
    if (dx == 0 && dy == 0) return 0;
    if (dx > 0 && dy >= 0) begin quad[0]++; return q; end
    if (dx <= 0 && dy > 0) begin quad[1]++; return 17 - q; end
    if (dx < 0 && dy <= 0) begin quad[2]++; return 18 + q; end
    quad[3]++;
    return 35 - q;
  endfunction

  task automatic reference(input int i);
    int h [36];
    int m1, b1, b2, v2;
    bit border = 0;
    foreach (h[b]) h[b] = 0;
    for (int y = fpy[i] - WIN_R; y <= fpy[i] + WIN_R; y++)
      for (int x = fpx[i] - WIN_R; x <= fpx[i] + WIN_R; x++) begin
        if (x < 1 || x > IMG_W - 2 || y < 1 || y > IMG_H - 2) border = 1;
        else begin
          int dx = int'(img[y][x+1]) - int'(img[y][x-1]);
          int dy = int'(img[y+1][x]) - int'(img[y-1][x]);
          int bb = ref_bin(dx, dy);
          h[bb] += ref_mag(dx, dy);
        end
      end
    if (border) n_border++;
    b1 = 0; m1 = h[0];
    for (int b = 1; b < 36; b++) if (h[b] > m1) begin m1 = h[b]; b1 = b; end
    b2 = -1; v2 = -1;
    for (int b = 0; b < 36; b++) begin
      int l = h[(b + 35) % 36], r = h[(b + 1) % 36];
      if (b != b1 && h[b] > l && h[b] > r && 5 * h[b] >= 4 * m1 && h[b] > v2) begin
        b2 = b; v2 = h[b];
      end
    end
    exp_bin1[i] = b1;
    exp_two[i]  = b2 >= 0;
    exp_bin2[i] = b2 < 0 ? 0 : b2;
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (busy) cycles++;

  initial begin
    int seed_x;
    // ---- image: noise, then ramps and edges planted around some points
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) img[y][x] = 8'($urandom_range(0, 255));
    for (int i = 0; i < N_FP; i++) begin
      fpx[i] = $urandom_range(WIN_R + 1, IMG_W - WIN_R - 2);
      fpy[i] = $urandom_range(WIN_R + 1, IMG_H - WIN_R - 2);
    end
    // points on or near the border
    fpx[0] = 0;          fpy[0] = 0;
    fpx[1] = IMG_W - 1;  fpy[1] = IMG_H - 1;
    fpx[2] = 3;          fpy[2] = 240;
    fpx[3] = 320;        fpy[3] = IMG_H - 2;
    // every third point sits on a smooth ramp of random direction
    for (int i = 4; i < N_FP; i += 3) begin
      int gx, gy;
      gx = int'($urandom_range(0, 12)) - 6;
      gy = int'($urandom_range(0, 12)) - 6;
      for (int y = fpy[i] - WIN_R - 1; y <= fpy[i] + WIN_R + 1; y++)
        for (int x = fpx[i] - WIN_R - 1; x <= fpx[i] + WIN_R + 1; x++)
          img[y][x] = 8'(clamp8(128 + gx * (x - fpx[i]) + gy * (y - fpy[i])
                                + $urandom_range(0, 2)));
    end
    // ---- memory contents
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        nbr_word_t w;
        w.pad   = '0;
        w.up    = y > 0         ? img[y-1][x] : 8'd0;
        w.down  = y < IMG_H - 1 ? img[y+1][x] : 8'd0;
        w.left  = x > 0         ? img[y][x-1] : 8'd0;
        w.right = x < IMG_W - 1 ? img[y][x+1] : 8'd0;
        u_mem.mem[y * IMG_W + x] = w;
      end
    for (int i = 0; i < N_FP; i++) begin
      fp_rec_t r;
      r.pad = '0;
      r.val = img[fpy[i]][fpx[i]];
      r.pos.x = XW'(fpx[i]);
      r.pos.y = YW'(fpy[i]);
      u_mem.mem[FP_BASE + i] = r;
      reference(i);
      if (exp_two[i]) n_two++; else n_one++;
    end

    // ---- run one frame
    fp_count = 16'(N_FP);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (done);
    @(posedge clk);

    // ---- compare records
    begin
      int n = 0, exp_cycles = 2;
      for (int i = 0; i < N_FP; i++) begin
        ori_rec_t r;
        exp_cycles += 3 * WIN * WIN + (exp_two[i] ? 2 : 1);
        r = ori_rec_t'(u_mem.mem[OUT_BASE + n]);
        check(r.pos.x == XW'(fpx[i]) && r.pos.y == YW'(fpy[i]) &&
              r.val == img[fpy[i]][fpx[i]] && int'(r.bin) == exp_bin1[i],
              $sformatf("fp %0d (%0d,%0d) first bin %0d expected %0d",
                        i, fpx[i], fpy[i], r.bin, exp_bin1[i]));
        n++;
        if (exp_two[i]) begin
          r = ori_rec_t'(u_mem.mem[OUT_BASE + n]);
          check(r.pos.x == XW'(fpx[i]) && r.pos.y == YW'(fpy[i]) &&
                int'(r.bin) == exp_bin2[i],
                $sformatf("fp %0d second bin %0d expected %0d", i, r.bin, exp_bin2[i]));
          n++;
        end
      end
      check(int'(rec_count) == n, $sformatf("rec_count %0d expected %0d", rec_count, n));
      check(cycles == exp_cycles, $sformatf("cycles %0d expected %0d", cycles, exp_cycles));
      $display("frame: %0d feature points, %0d records, %0d clocks (%.1f frames/s at 130 MHz)",
               N_FP, n, cycles, 130.0e6 / real'(cycles));
    end

    // ---- mechanisms
    $display("two orientations %0d, one orientation %0d, border windows %0d, saturated magnitudes %0d, quadrants %0d %0d %0d %0d",
             n_two, n_one, n_border, n_sat, quad[0], quad[1], quad[2], quad[3]);
    check(n_two > 0, "no feature point with two orientations");
    check(n_one > 0, "no feature point with one orientation");
    check(n_border > 0, "no window crossing the border");
    check(n_sat > 0, "no saturated magnitude");
    foreach (quad[q]) check(quad[q] > 0, $sformatf("quadrant %0d never seen", q));

    // ---- an empty run ends at once
    fp_count = 0;
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    check(!busy && rec_count == 0, "empty run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
