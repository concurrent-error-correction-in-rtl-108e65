// tb_rwpv_sizes: runs the three RWPV circuits (ripple adder, lookahead-cell adder,
// ALU) at every array length they were evaluated at below the default: N = 12, 24,
// 36 and 48 (N = 96 is covered by tb_rwpv_top). Each size gets random operations with
// and without errors confined to one part; all results must be exact.
module tb_rwpv_sizes;
  localparam int NS = 4;
  localparam int unsigned SIZES [NS] = '{12, 24, 36, 48};
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NS-1:0] done;
  int c [NS], f [NS], k [NS];
  int checks = 0, failures = 0, cycles = 0;

  for (genvar i = 0; i < NS; i++) begin : g_size
    rwpv_size_check #(.N(SIZES[i]), .OPS(500)) u_chk (
      .clk, .rst_n, .done (done[i]), .checks (c[i]), .failures (f[i]), .corrected (k[i]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (&done);
    for (int i = 0; i < NS; i++) begin
      $display("N=%0d: checks=%0d failures=%0d operations with corrected errors=%0d",
               SIZES[i], c[i], f[i], k[i]);
      checks += c[i];
      failures += f[i];
      checks++;
      if (k[i] == 0) begin failures++; $display("FAIL N=%0d: no errors were injected", SIZES[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
