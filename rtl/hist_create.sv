// hist_create (HistCreate): the 36-bin orientation histogram of one feature
// point's window.
//
// Each accepted pixel adds its gradient magnitude to the bin of its gradient
// orientation. 'clear' empties all bins at the start of a feature point and
// takes priority over 'acc'. Bins are HIST_W bits wide and saturate instead
// of wrapping (a 13x13 window of magnitudes <= 128 needs at most 15 bits).
// The document names the block and its role; plain magnitude weighting (no
// Gaussian window weight, no smoothing of the histogram) is this design's
// reading of its silence on weighting.
//
// Interface: clear, acc, bin, gm in; hist[0..35] out (registered).
// Timing: one update per clock; the sum is visible the clock after 'acc'.
module hist_create
  import oc_pkg::*;
#(
  parameter int HIST_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              acc,
  input  logic [BIN_W-1:0]  bin,
  input  logic [MAG_W-1:0]  gm,
  output logic [HIST_W-1:0] hist [NBINS]
);

  logic [HIST_W:0] sum;
  assign sum = {1'b0, hist[bin]} + (HIST_W+1)'(gm);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBINS; b++) hist[b] <= '0;
    end else if (clear) begin
      for (int b = 0; b < NBINS; b++) hist[b] <= '0;
    end else if (acc && bin < BIN_W'(NBINS)) begin
      hist[bin] <= sum[HIST_W] ? '1 : sum[HIST_W-1:0];
    end
  end

endmodule
