// thd_creator (ThdCreator): the eight angle thresholds |dx| * tan(10k deg),
// k = 1..8, built from shifted copies of |dx| with no multiplier.
//
// Each tangent is a 3.8 fixed-point constant (oc_pkg::TAN_Q8, the binary
// tangent table). For every set bit j of a constant, |dx| shifted by j - 8
// places contributes; here the shifts are taken relative to 2^-8 so that no
// fraction bit is lost: thd[k] = |dx| * TAN_Q8[k], i.e. the true product
// scaled by 256. The shifted copies are the LeftShift/RightShift units; the
// set of constants and the shift-and-add scheme follow the document, keeping
// the fraction bits (no truncation of the right-shifted copies) is this
// design's choice.
//
// Interface: abs_dx in, thd[0..7] out (thd[0] is the 10-degree threshold,
// signal a1's reference). Purely combinational.
module thd_creator
  import oc_pkg::*;
(
  input  logic [ABS_W-1:0] abs_dx,
  output logic [THD_W-1:0] thd [NTHD]
);

  always_comb begin
    for (int k = 0; k < NTHD; k++) begin
      thd[k] = '0;
      for (int j = 0; j < TAN_W; j++) begin
        if (TAN_Q8[k][j]) thd[k] = thd[k] + (THD_W'(abs_dx) << j);
      end
    end
  end

endmodule
