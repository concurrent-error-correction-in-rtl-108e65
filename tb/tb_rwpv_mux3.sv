// tb_rwpv_mux3: MUX1 check. For random low/middle/high inputs and each phase select
// the output must be the selected third.
module tb_rwpv_mux3;
  import rwpv_pkg::*;
  localparam int unsigned W = 32;
  logic [W-1:0] in_l, in_m, in_h, out;
  phase_e sel;
  int checks = 0, failures = 0;

  rwpv_mux3 #(.W(W)) dut (.in_l, .in_m, .in_h, .sel, .out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    for (int i = 0; i < 300; i++) begin
      in_l = $urandom; in_m = $urandom; in_h = $urandom;
      sel  = phase_e'(i % 3);
      #1;
      exp = (i % 3 == 0) ? in_l : (i % 3 == 1) ? in_m : in_h;
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
