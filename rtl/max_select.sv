// max_select (MaxSelect): up to two major orientations of a feature point
// from its 36-bin histogram.
//
// The first orientation is the highest bin (the lowest index wins a tie). A
// second orientation is reported when another bin is a peak, strictly above
// both of its circular neighbours, and reaches at least 80 % of the highest
// bin (5*h >= 4*hmax, exact integer test); the highest such bin is taken. At
// most two orientations per feature point follow the document; the 80 % peak
// rule is the usual SIFT rule and is this design's choice, as the document
// does not state its criterion.
//
// Interface: hist[0..35] in; bin1, val1, has2, bin2 out. Combinational
// (registered by the caller).
module max_select
  import oc_pkg::*;
#(
  parameter int HIST_W = 16
) (
  input  logic [HIST_W-1:0] hist [NBINS],
  output logic [BIN_W-1:0]  bin1,
  output logic [HIST_W-1:0] val1,
  output logic              has2,
  output logic [BIN_W-1:0]  bin2
);

  logic [HIST_W-1:0] val2;
  logic [NBINS-1:0]  peak;

  always_comb begin
    bin1 = '0;
    val1 = hist[0];
    for (int b = 1; b < NBINS; b++) begin
      if (hist[b] > val1) begin
        val1 = hist[b];
        bin1 = BIN_W'(b);
      end
    end
  end

  always_comb begin
    for (int b = 0; b < NBINS; b++) begin
      peak[b] = hist[b] > hist[(b + NBINS - 1) % NBINS] &&
                hist[b] > hist[(b + 1) % NBINS];
    end
  end

  always_comb begin
    has2 = 1'b0;
    bin2 = '0;
    val2 = '0;
    for (int b = 0; b < NBINS; b++) begin
      if (BIN_W'(b) != bin1 && peak[b] &&
          5 * (HIST_W+3)'(hist[b]) >= 4 * (HIST_W+3)'(val1) &&
          (!has2 || hist[b] > val2)) begin
        has2 = 1'b1;
        bin2 = BIN_W'(b);
        val2 = hist[b];
      end
    end
  end

endmodule
