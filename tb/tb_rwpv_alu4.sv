// tb_rwpv_alu4: exhaustive check of the 74181-type ALU cell over every a, b, select,
// mode and carry in (16384 cases). F is compared with the published function table
// (rwpv_tb_ref_pkg); the active-low carry out with the unsigned carry for the
// functions where that is defined; A=B with equality of a and b in the
// "A minus B minus 1" subtract mode with no carry in; group generate and propagate
// against the carries of a + b and a + b + 1 in the A plus B mode.
module tb_rwpv_alu4;
  import rwpv_tb_ref_pkg::*;
  logic [3:0] a, b, s, f;
  logic m, cn_n, cn4_n, p_n, g_n, aeqb;
  int checks = 0, failures = 0;

  rwpv_alu4 dut (.a, .b, .s, .m, .cn_n, .f, .cn4_n, .p_n, .g_n, .aeqb);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] fr;
    logic cr, known;
    for (int v = 0; v < 16384; v++) begin
      {m, cn_n, s, a, b} = 14'(v);
      #1;
      fr = alu_ref(128'(a), 128'(b), s, m, ~cn_n, 4);
      checks++;
      if (f !== fr[3:0]) begin
        failures++;
        $display("FAIL F m=%0b s=%b cn_n=%0b a=%h b=%h -> f=%h exp %h", m, s, cn_n, a, b, f, fr[3:0]);
      end
      cr = alu_carry(128'(a), 128'(b), s, ~cn_n, 4, known);
      if (known && !m) begin
        checks++;
        if (cn4_n !== ~cr) begin
          failures++;
          $display("FAIL Cn+4 s=%b cn_n=%0b a=%h b=%h -> %0b", s, cn_n, a, b, cn4_n);
        end
      end
      // group generate/propagate in A plus B: G is the carry of a + b, and G or P
      // the carry of a + b + 1
      if (!m && s == 4'b1001) begin
        checks++;
        if (g_n !== ~(5'(a) + 5'(b) > 5'd15) || (~g_n | ~p_n) !== (5'(a) + 5'(b) + 5'd1 > 5'd15)) begin
          failures++;
          $display("FAIL P/G a=%h b=%h -> p_n=%0b g_n=%0b", a, b, p_n, g_n);
        end
      end
      if (!m && s == 4'b0110 && cn_n) begin
        checks++;
        if (aeqb !== (a == b)) begin
          failures++;
          $display("FAIL A=B a=%h b=%h -> %0b", a, b, aeqb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
