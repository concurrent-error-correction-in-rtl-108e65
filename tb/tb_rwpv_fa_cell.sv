// tb_rwpv_fa_cell: exhaustive check of the full adder cell: {co, s} must equal
// a + b + ci for all eight input combinations.
module tb_rwpv_fa_cell;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  rwpv_fa_cell dut (.a, .b, .ci, .s, .co);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if ({co, s} !== 2'(a) + 2'(b) + 2'(ci)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> co=%0b s=%0b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
