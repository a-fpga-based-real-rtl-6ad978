// bin_select (BinSelect): shifting-based orientation, mapping a gradient
// (dx, dy) straight to its 10-degree histogram bin 0..35 without division or
// arctangent.
//
// Structure: Absx and Absy take the magnitudes; thd_creator multiplies |dx|
// by the eight tangent constants with shifts and adds; angle_cmp compares |dy|
// against them and encodes the 0..90 degree bin; bin_creator adds the
// quadrant from the signs of dx and dy. Bin b covers theta = atan2(dy, dx)
// in [10b, 10b+10) degrees, to within the +-0.03 degree error of the tangent
// constants. The chain of blocks follows the document's BinSelect figure;
// there the shifted copies are taken of the y magnitude, while the text
// multiplies dx by the tangent: this design follows the text.
//
// Interface: signed dx, dy in; bin (and the a1..a8 threshold signals) out.
// Purely combinational.
module bin_select
  import oc_pkg::*;
(
  input  logic signed [GRAD_W-1:0] dx,
  input  logic signed [GRAD_W-1:0] dy,
  output logic        [NTHD-1:0]   a,
  output logic        [BIN_W-1:0]  bin
);

  logic [ABS_W-1:0]  abs_dx, abs_dy;   // Absx, Absy
  logic [THD_W-1:0]  thd [NTHD];
  logic [QBIN_W-1:0] qbin;

  always_comb begin
    abs_dx = ABS_W'(dx < 0 ? -dx : dx);
    abs_dy = ABS_W'(dy < 0 ? -dy : dy);
  end

  thd_creator u_thd (
    .abs_dx (abs_dx),
    .thd    (thd)
  );

  angle_cmp u_cmp (
    .abs_dy (abs_dy),
    .thd    (thd),
    .a      (a),
    .qbin   (qbin)
  );

  bin_creator u_bin (
    .qbin    (qbin),
    .dx_neg  (dx < 0),
    .dx_zero (dx == 0),
    .dy_neg  (dy < 0),
    .dy_zero (dy == 0),
    .bin     (bin)
  );

endmodule
