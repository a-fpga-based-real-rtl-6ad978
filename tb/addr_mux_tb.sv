// addr_mux_tb: each select value with random addresses; port A must carry
// the chosen source and port B always the feature-point address.
module addr_mux_tb;
  import oc_pkg::*;

  localparam int AW = 20;

  asel_e sel;
  logic [AW-1:0] fp_addr, pix_addr, out_addr, addr_a, addr_b;
  int checks = 0, failures = 0;

  addr_mux #(.ADDR_W(AW)) dut (.sel, .fp_addr, .pix_addr, .out_addr, .addr_a, .addr_b);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [AW-1:0] e;
      fp_addr  = AW'($urandom);
      pix_addr = AW'($urandom);
      out_addr = AW'($urandom);
      case (t % 3)
        0: begin sel = ASEL_FP;  e = fp_addr;  end
        1: begin sel = ASEL_PIX; e = pix_addr; end
        default: begin sel = ASEL_OUT; e = out_addr; end
      endcase
      #1;
      checks++;
      if (addr_a !== e || addr_b !== fp_addr) begin
        failures++;
        $display("FAIL: sel=%0d addr_a=%h expected %h", sel, addr_a, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
