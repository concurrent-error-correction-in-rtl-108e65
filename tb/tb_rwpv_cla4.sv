// tb_rwpv_cla4: exhaustive check of the 4-bit lookahead adder cell over all 512
// combinations of a, b and c0: {c4, s} must equal a + b + c0.
module tb_rwpv_cla4;
  logic [3:0] a, b, s;
  logic c0, c4;
  int checks = 0, failures = 0;

  rwpv_cla4 dut (.a, .b, .c0, .s, .c4);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {c0, a, b} = 9'(v);
      #1;
      checks++;
      if ({c4, s} !== 5'(a) + 5'(b) + 5'(c0)) begin
        failures++;
        $display("FAIL a=%h b=%h c0=%0b -> c4=%0b s=%h", a, b, c0, c4, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
