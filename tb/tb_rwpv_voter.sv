// tb_rwpv_voter: majority voter check. Random words with random errors in one input
// must vote back to the true word; and for fully random inputs every output bit must
// equal the bit count majority, computed bit by bit.
module tb_rwpv_voter;
  localparam int unsigned W = 32;
  logic [W-1:0] in0, in1, in2, out;
  int checks = 0, failures = 0;

  rwpv_voter #(.W(W)) dut (.in0, .in1, .in2, .out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] good, err, exp;
    for (int i = 0; i < 300; i++) begin
      good = $urandom; err = $urandom;
      in0 = good; in1 = good; in2 = good;
      case (i % 3)
        0: in0 = good ^ err;
        1: in1 = good ^ err;
        default: in2 = good ^ err;
      endcase
      #1;
      checks++;
      if (out !== good) begin
        failures++;
        $display("FAIL masked error in input %0d: out=%h exp=%h", i % 3, out, good);
      end
      in0 = $urandom; in1 = $urandom; in2 = $urandom;
      #1;
      for (int k = 0; k < W; k++)
        exp[k] = (int'(in0[k]) + int'(in1[k]) + int'(in2[k])) >= 2;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL majority: out=%h exp=%h", out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
