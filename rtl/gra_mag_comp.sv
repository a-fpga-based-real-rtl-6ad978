// gra_mag_comp (GraMagComp): gradient magnitude by a threshold table instead
// of a square-root unit.
//
// GM = sqrt(dx^2 + dy^2) is only needed as an integer weight for the
// orientation histogram, so the block squares the two differences, compares
// the sum s against N_THR constant thresholds and returns how many of them s
// exceeds. Threshold k (k = 0..N_THR-1) is k*k + k, the largest s whose
// square root rounds to k, so the result is round(sqrt(s)) saturated at N_THR:
// 0 for s = 0, 1 for 1..2, ..., 127 for 16003..16256, 128 above 16256.
// The thresholds and the saturation at 128 follow the document's table; the
// comparator-and-count realisation is this design's.
//
// Interface: signed dx, dy in; gm out. Purely combinational (no clock).
module gra_mag_comp
  import oc_pkg::*;
#(
  parameter int N_THR = 128   // number of thresholds = saturation value
) (
  input  logic signed [GRAD_W-1:0] dx,
  input  logic signed [GRAD_W-1:0] dy,
  output logic        [MAG_W-1:0]  gm
);

  localparam int SQ_W = 2 * GRAD_W;   // dx^2 + dy^2 < 2^(2*GRAD_W-1) * 2

  logic [SQ_W-1:0] sum_sq;
  logic [N_THR-1:0] above;

  always_comb begin
    sum_sq = SQ_W'(dx * dx) + SQ_W'(dy * dy);
    for (int k = 0; k < N_THR; k++) begin
      above[k] = sum_sq > SQ_W'(k * k + k);
    end
  end

  // The thresholds rise with k, so 'above' is a thermometer code: its
  // population count is the index of the first threshold not exceeded.
  always_comb begin
    gm = '0;
    for (int k = 0; k < N_THR; k++) begin
      gm = gm + MAG_W'(above[k]);
    end
  end

endmodule
