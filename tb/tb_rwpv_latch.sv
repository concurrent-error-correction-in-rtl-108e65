// tb_rwpv_latch: storage latch check. After reset q is 0; at each rising edge q takes
// d when ld is high and keeps its value when ld is low. A reference copy is kept in
// the testbench.
module tb_rwpv_latch;
  localparam int unsigned W = 16;
  logic clk = 1'b0, rst_n = 1'b0, ld = 1'b0;
  logic [W-1:0] d = '0, q, ref_q;
  int checks = 0, failures = 0, cycles = 0;

  rwpv_latch #(.W(W)) dut (.clk, .rst_n, .ld, .d, .q);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1'b1;
    ref_q = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      ld = 1'($urandom);
      d  = W'($urandom);
      @(posedge clk);
      if (ld) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL cycle %0d ld=%0b q=%h exp=%h", i, ld, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
