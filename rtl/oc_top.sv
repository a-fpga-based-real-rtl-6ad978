// oc_top: orientation-calculation accelerator for SIFT feature points.
//
// For each of 'fp_count' feature points stored in FP memory the accelerator
// scans the (2*WIN_R+1)^2 pixels around it in the Gaussian image, turns each
// pixel's central differences dx, dy into a gradient magnitude (gra_mag_comp,
// threshold-table square root) and a 10-degree orientation bin (bin_select,
// shift-and-compare arctangent), accumulates a 36-bin magnitude-weighted
// histogram (hist_create), picks up to two major orientations (max_select)
// and writes one result record per orientation back to FP memory.
//
// Memory: both ports of a dual-port 36-bit board memory are brought out; a
// read returns its word on the clock after re_* (one-clock access). Regions:
//   FP_BASE + i      : fp_rec_t of feature point i (read on port B)
//   GAUSS_BASE + y*IMG_W + x : nbr_word_t, the 4 neighbours of pixel (x,y)
//   OUT_BASE + n     : ori_rec_t result records, written on port A in order
// Stages per feature point (the sequencer in this module):
//   Initiation (1 clock): take the prefetched record, load add_ctrl_unit,
//     clear the histogram, read the first window pixel on port A and
//     prefetch the next record on port B;
//   per window pixel (3 clocks): Loading (port-A read of the neighbour word;
//     for the first pixel this is the initiation clock), difference (dx, dy
//     registered), accumulate (histogram update);
//   Writing (1 clock per orientation, port-A write).
// A feature point therefore takes 3*(2*WIN_R+1)^2 + (1 or 2) clocks, 508 or
// 509 with WIN_R = 6; a run adds 2 clocks to fetch the first record. The
// stage names and port use follow the document's memory-port table; the
// window size, the record layouts and the neighbour-word layout are this
// design's choices.
//
// Control: pulse 'start' with 'fp_count' valid while idle; 'busy' is high
// during the run, 'done' pulses for one clock at its end, 'rec_count' holds
// the number of result records written.
module oc_top
  import oc_pkg::*;
#(
  parameter int IMG_W      = 640,
  parameter int IMG_H      = 480,
  parameter int WIN_R      = 6,
  parameter int ADDR_W     = 20,
  parameter int GAUSS_BASE = 0,
  parameter int FP_BASE    = 'h80000,
  parameter int OUT_BASE   = 'hC0000,
  parameter int HIST_W     = 16,
  parameter int FPCNT_W    = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [FPCNT_W-1:0] fp_count,
  output logic               busy,
  output logic               done,
  output logic [FPCNT_W:0]   rec_count,
  // DDR2 port A: pixel reads and result writes
  output logic [ADDR_W-1:0]  mem_a_addr,
  output logic               mem_a_re,
  output logic               mem_a_we,
  output logic [WORD_W-1:0]  mem_a_wdata,
  input  logic [WORD_W-1:0]  mem_a_rdata,
  // DDR2 port B: feature-point record reads
  output logic [ADDR_W-1:0]  mem_b_addr,
  output logic               mem_b_re,
  input  logic [WORD_W-1:0]  mem_b_rdata
);

  typedef enum logic [3:0] {
    S_IDLE, S_PREF, S_PREF_WAIT, S_INIT, S_LOAD, S_DIFF, S_ACC, S_WR1, S_WR2
  } state_e;

  state_e state;

  logic [FPCNT_W-1:0] n_fp;        // feature points in this run
  logic [FPCNT_W-1:0] fp_idx;      // current feature point
  logic               pf_pending;  // port-B prefetch data arrives this clock
  fp_rec_t            next_fp, cur_fp;
  logic [ADDR_W-1:0]  out_ptr;
  logic signed [GRAD_W-1:0] dx_r, dy_r;
  logic [BIN_W-1:0]   bin2_r;

  // Datapath blocks
  logic [ADDR_W-1:0] pix_addr, fp_addr, out_addr;
  logic              in_img, win_last;
  logic              acu_load, acu_step;
  logic [MAG_W-1:0]  gm;
  logic [BIN_W-1:0]  bin;
  logic [NTHD-1:0]   a_unused;
  logic              hist_clear, hist_acc;
  logic [HIST_W-1:0] hist [NBINS];
  logic [BIN_W-1:0]  bin1, bin2;
  logic [HIST_W-1:0] val1;
  logic              has2;
  asel_e             asel;
  nbr_word_t         nbr;

  add_ctrl_unit #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .WIN_R(WIN_R),
    .ADDR_W(ADDR_W), .GAUSS_BASE(GAUSS_BASE)
  ) u_acu (
    .clk, .rst_n,
    .load   (acu_load),
    .step   (acu_step),
    .center (next_fp.pos),
    .addr   (pix_addr),
    .in_img (in_img),
    .last   (win_last)
  );

  addr_mux #(.ADDR_W(ADDR_W)) u_amux (
    .sel      (asel),
    .fp_addr  (fp_addr),
    .pix_addr (pix_addr),
    .out_addr (out_addr),
    .addr_a   (mem_a_addr),
    .addr_b   (mem_b_addr)
  );

  gra_mag_comp u_gm (
    .dx (dx_r),
    .dy (dy_r),
    .gm (gm)
  );

  bin_select u_bs (
    .dx  (dx_r),
    .dy  (dy_r),
    .a   (a_unused),
    .bin (bin)
  );

  hist_create #(.HIST_W(HIST_W)) u_hist (
    .clk, .rst_n,
    .clear (hist_clear),
    .acc   (hist_acc),
    .bin   (bin),
    .gm    (gm),
    .hist  (hist)
  );

  max_select #(.HIST_W(HIST_W)) u_max (
    .hist (hist),
    .bin1 (bin1),
    .val1 (val1),
    .has2 (has2),
    .bin2 (bin2)
  );

  // ---------------------------------------------------------------- control
  logic last_fp;
  assign last_fp = fp_idx + 1'b1 >= n_fp;
  assign nbr     = nbr_word_t'(mem_a_rdata);
  assign out_addr = out_ptr;

  always_comb begin
    asel        = ASEL_PIX;
    mem_a_re    = 1'b0;
    mem_a_we    = 1'b0;
    mem_a_wdata = '0;
    mem_b_re    = 1'b0;
    fp_addr     = ADDR_W'(FP_BASE) + ADDR_W'(fp_idx);
    acu_load    = 1'b0;
    acu_step    = 1'b0;
    hist_clear  = 1'b0;
    hist_acc    = 1'b0;
    unique case (state)
      S_PREF: mem_b_re = 1'b1;
      S_INIT: begin
        acu_load   = 1'b1;
        mem_a_re   = 1'b1;      // first window pixel
        hist_clear = 1'b1;
        fp_addr    = ADDR_W'(FP_BASE) + ADDR_W'(fp_idx) + 1'b1;
        mem_b_re   = !last_fp;
      end
      S_LOAD: mem_a_re = 1'b1;
      S_ACC: begin
        hist_acc = in_img;
        acu_step = !win_last;
      end
      S_WR1: begin
        asel        = ASEL_OUT;
        mem_a_we    = 1'b1;
        mem_a_wdata = ori_rec_t'{pad: '0, val: cur_fp.val, pos: cur_fp.pos, bin: bin1};
      end
      S_WR2: begin
        asel        = ASEL_OUT;
        mem_a_we    = 1'b1;
        mem_a_wdata = ori_rec_t'{pad: '0, val: cur_fp.val, pos: cur_fp.pos, bin: bin2_r};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      n_fp       <= '0;
      fp_idx     <= '0;
      pf_pending <= 1'b0;
      next_fp    <= '0;
      cur_fp     <= '0;
      out_ptr    <= '0;
      dx_r       <= '0;
      dy_r       <= '0;
      bin2_r     <= '0;
      rec_count  <= '0;
      done       <= 1'b0;
    end else begin
      done       <= 1'b0;
      pf_pending <= mem_b_re;
      if (pf_pending) next_fp <= fp_rec_t'(mem_b_rdata);
      unique case (state)
        S_IDLE: if (start) begin
          n_fp      <= fp_count;
          fp_idx    <= '0;
          out_ptr   <= ADDR_W'(OUT_BASE);
          rec_count <= '0;
          if (fp_count == '0) done  <= 1'b1;
          else                state <= S_PREF;
        end
        S_PREF:      state <= S_PREF_WAIT;
        S_PREF_WAIT: state <= S_INIT;
        S_INIT: begin
          cur_fp <= next_fp;
          state  <= S_DIFF;
        end
        S_LOAD: state <= S_DIFF;
        S_DIFF: begin
          dx_r  <= GRAD_W'(nbr.right) - GRAD_W'(nbr.left);
          dy_r  <= GRAD_W'(nbr.down)  - GRAD_W'(nbr.up);
          state <= S_ACC;
        end
        S_ACC: state <= win_last ? S_WR1 : S_LOAD;
        S_WR1, S_WR2: begin
          out_ptr   <= out_ptr + 1'b1;
          rec_count <= rec_count + 1'b1;
          bin2_r    <= bin2;
          if (state == S_WR1 && has2) begin
            state <= S_WR2;
          end else if (last_fp) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            fp_idx <= fp_idx + 1'b1;
            state  <= S_INIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = state != S_IDLE;

  // A port never reads and writes in the same clock.
  a_port_a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(mem_a_re && mem_a_we));
  // The histogram is only updated while a window is being scanned.
  a_acc_in_scan: assert property (@(posedge clk) disable iff (!rst_n) hist_acc |-> state == S_ACC);

endmodule
