// ddr2_dp_model: behavioural model (not synthesizable as intended hardware)
// of the board's dual-port memory as the accelerator sees it: two
// independent 36-bit ports, each doing one read or one write per clock, read
// data returned on the clock after the request. The array is DEPTH words;
// testbenches fill and inspect it through 'mem' directly.
module ddr2_dp_model #(
  parameter int ADDR_W = 20,
  parameter int WORD_W = 36
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic              a_re,
  input  logic              a_we,
  input  logic [WORD_W-1:0] a_wdata,
  output logic [WORD_W-1:0] a_rdata,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic              b_re,
  input  logic              b_we,
  input  logic [WORD_W-1:0] b_wdata,
  output logic [WORD_W-1:0] b_rdata
);

  logic [WORD_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    else if (a_re) a_rdata <= mem[a_addr];
    if (b_we) mem[b_addr] <= b_wdata;
    else if (b_re) b_rdata <= mem[b_addr];
  end

endmodule
