// angle_cmp (AngleCmp): first-quadrant orientation bin from |dy| and the
// eight thresholds of thd_creator.
//
// Threshold signal a(k+1) is 1 when |dy| >= |dx| * tan(10(k+1) deg), the lower
// bound of the multiplied-out bin test dx*tan(Tl) <= dy < dx*tan(Tu). |dy| is
// scaled by 2^8 to match the fixed-point thresholds. The bin is the position
// of the first 0 among a1..a8 (0 when a1 = 0, ..., 7 when only a8 = 0) and 8
// when all are 1, i.e. 0..8 for 0-10, ..., 80-90 degrees, as in the
// document's bin-definition table.
//
// Interface: abs_dy and thd[0..7] in; a (bit k = a(k+1)) and qbin out.
// Purely combinational.
module angle_cmp
  import oc_pkg::*;
(
  input  logic [ABS_W-1:0]  abs_dy,
  input  logic [THD_W-1:0]  thd [NTHD],
  output logic [NTHD-1:0]   a,
  output logic [QBIN_W-1:0] qbin
);

  logic [THD_W-1:0] dy_scaled;

  always_comb begin
    dy_scaled = THD_W'(abs_dy) << TAN_FRAC;
    for (int k = 0; k < NTHD; k++) begin
      a[k] = dy_scaled >= thd[k];
    end
  end

  // Priority on the first threshold that is not reached.
  always_comb begin
    qbin = QBIN_W'(NTHD);
    for (int k = NTHD - 1; k >= 0; k--) begin
      if (!a[k]) qbin = QBIN_W'(k);
    end
  end

endmodule
