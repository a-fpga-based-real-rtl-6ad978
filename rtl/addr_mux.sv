// addr_mux (AddMUX): chooses the address presented to memory port A.
//
// Port A reads pixel words at the address fed back from add_ctrl_unit
// (Gaussian memory) and writes result records (FP memory); it can also be
// pointed at a feature-point record (ASEL_FP), a path oc_top does not use
// because it fetches records on port B. 'sel' picks one of the three; an
// unused select value gives the pixel address. Port B only reads
// feature-point records, so its address is the FP read pointer. The
// document shows AddMUX with the AddCtrlUnit feedback and two outside
// inputs; the three sources are this design's reading of that figure.
//
// Interface: fp_addr, pix_addr, out_addr, sel in; addr_a, addr_b out.
// Combinational.
module addr_mux
  import oc_pkg::*;
#(
  parameter int ADDR_W = 20
) (
  input  asel_e             sel,
  input  logic [ADDR_W-1:0] fp_addr,
  input  logic [ADDR_W-1:0] pix_addr,
  input  logic [ADDR_W-1:0] out_addr,
  output logic [ADDR_W-1:0] addr_a,
  output logic [ADDR_W-1:0] addr_b
);

  always_comb begin
    unique case (sel)
      ASEL_FP:  addr_a = fp_addr;
      ASEL_OUT: addr_a = out_addr;
      default:  addr_a = pix_addr;
    endcase
    addr_b = fp_addr;
  end

endmodule
