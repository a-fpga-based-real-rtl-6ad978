// bin_creator (BinCreator): unfolds the first-quadrant bin q (0..8, angle
// phi = atan(|dy|/|dx|) in 10-degree steps) to one of 36 bins covering
// 0..360 degrees, bin b holding angles 10b .. 10b+10, using the signs of dx
// and dy. The document states only that the signs complete the bin; the
// quadrant formulas below are this design's:
//   dx > 0,  dy >= 0 : theta = phi        -> bin q
//   dx <= 0, dy > 0  : theta = 180 - phi  -> bin 17 - q
//   dx < 0,  dy <= 0 : theta = 180 + phi  -> bin 18 + q
//   dx >= 0, dy < 0  : theta = 360 - phi  -> bin 35 - q
//   dx = dy = 0      : bin 0 (its magnitude is 0, so it adds nothing)
// The axis cases fall on the bins of 0, 90, 180 and 270 degrees.
//
// Interface: qbin, dx_neg, dx_zero, dy_neg, dy_zero in; bin out.
// Purely combinational.
module bin_creator
  import oc_pkg::*;
(
  input  logic [QBIN_W-1:0] qbin,
  input  logic              dx_neg,
  input  logic              dx_zero,
  input  logic              dy_neg,
  input  logic              dy_zero,
  output logic [BIN_W-1:0]  bin
);

  logic [BIN_W-1:0] q;
  assign q = BIN_W'(qbin);

  always_comb begin
    if (dx_zero && dy_zero)           bin = '0;
    else if (!dx_neg && !dx_zero && !dy_neg) bin = q;                 // quadrant I
    else if (!dx_neg && !dy_neg)      bin = BIN_W'(17) - q;           // dx = 0, dy > 0
    else if (dx_neg && !dy_neg && !dy_zero) bin = BIN_W'(17) - q;     // quadrant II
    else if (dx_neg)                  bin = BIN_W'(18) + q;           // quadrant III
    else                              bin = BIN_W'(35) - q;           // quadrant IV
  end

endmodule
