// add_ctrl_unit (AddCtrlUnit): address generator for the pixels around a
// feature point.
//
// 'load' latches the feature point (cx, cy) and points at the top-left pixel
// of the (2*WIN_R+1)^2 window; each 'step' moves to the next pixel in raster
// order. For the current pixel it gives its Gaussian-memory address
// GAUSS_BASE + y*IMG_W + x, 'in_img' (the pixel and its four neighbours lie
// inside the image, so its gradient exists) and 'last' (final window pixel).
// Positions off the image are clamped to the image so the address stays in
// the Gaussian memory; such pixels are flagged and not counted. The document
// names the unit and its feedback into AddMUX; the window size, raster order
// and border rule are this design's (see the README).
//
// Timing: addr/in_img/last follow 'step' on the next clock. While 'load' is
// high they already show the first window pixel of the new centre, so the
// first read can be issued in the same clock as the load.
module add_ctrl_unit
  import oc_pkg::*;
#(
  parameter int IMG_W      = 640,
  parameter int IMG_H      = 480,
  parameter int WIN_R      = 6,
  parameter int ADDR_W     = 20,
  parameter int GAUSS_BASE = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              step,
  input  pos_t              center,
  output logic [ADDR_W-1:0] addr,
  output logic              in_img,
  output logic              last
);

  localparam int CW = 12;   // signed coordinate width, covers -WIN_R..IMG_W+WIN_R

  logic signed [CW-1:0] px, py;        // current pixel (registered)
  logic signed [CW-1:0] x0, y1;        // window left column, bottom row
  logic signed [CW-1:0] cx0, cy0;      // first pixel of the window at 'center'
  logic signed [CW-1:0] qx, qy;        // pixel shown on the outputs
  logic [XW-1:0] ax;
  logic [YW-1:0] ay;

  assign cx0 = CW'(signed'({1'b0, center.x})) - CW'(WIN_R);
  assign cy0 = CW'(signed'({1'b0, center.y})) - CW'(WIN_R);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      px <= '0;
      py <= '0;
      x0 <= '0;
      y1 <= '0;
    end else if (load) begin
      px <= cx0;
      py <= cy0;
      x0 <= cx0;
      y1 <= cy0 + CW'(2 * WIN_R);
    end else if (step) begin
      if (px == x0 + CW'(2 * WIN_R)) begin
        px <= x0;
        py <= py + 1'b1;
      end else begin
        px <= px + 1'b1;
      end
    end
  end

  always_comb begin
    qx = load ? cx0 : px;
    qy = load ? cy0 : py;
    in_img = qx >= 1 && qx <= CW'(IMG_W - 2) && qy >= 1 && qy <= CW'(IMG_H - 2);
    last   = !load && px == x0 + CW'(2 * WIN_R) && py == y1;
    ax = qx < 0 ? '0 : qx > CW'(IMG_W - 1) ? XW'(IMG_W - 1) : XW'(qx);
    ay = qy < 0 ? '0 : qy > CW'(IMG_H - 1) ? YW'(IMG_H - 1) : YW'(qy);
    addr = ADDR_W'(GAUSS_BASE) + ADDR_W'(ay) * ADDR_W'(IMG_W) + ADDR_W'(ax);
  end

endmodule
