// tb_rwpv_mux2: MUX2 check. In phase PH_L the output must be ext, in PH_M and PH_H
// the latched value lc.
module tb_rwpv_mux2;
  import rwpv_pkg::*;
  localparam int unsigned SW = 4;
  logic [SW-1:0] ext, lc, out;
  phase_e sel;
  int checks = 0, failures = 0;

  rwpv_mux2 #(.SW(SW)) dut (.ext, .lc, .sel, .out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SW-1:0] exp;
    for (int i = 0; i < 300; i++) begin
      ext = SW'($urandom); lc = SW'($urandom);
      sel = phase_e'(i % 3);
      #1;
      exp = (i % 3 == 0) ? ext : lc;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL sel=%0d out=%h exp=%h", i % 3, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
