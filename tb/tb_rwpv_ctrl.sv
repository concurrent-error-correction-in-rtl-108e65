// tb_rwpv_ctrl: phase sequencer check. Random start pulses are driven; a reference
// model of the three-phase sequence (start while idle = phase L, then M, then H, then
// idle) predicts sel and every enable in every cycle. It also checks that valid comes
// exactly in the third cycle of an operation (latency 3) and that start held high
// gives one operation every three cycles.
module tb_rwpv_ctrl;
  import rwpv_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  phase_e sel;
  logic ld_lc, ld_sl, ld_sm, valid, busy;
  int checks = 0, failures = 0, cycles = 0;

  rwpv_ctrl dut (.clk, .rst_n, .start, .sel, .ld_lc, .ld_sl, .ld_sm, .valid, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_outputs(input int ph, input logic st);
    // ph: -1 idle, 0 L, 1 M, 2 H
    logic [1:0] e_sel;
    logic e_lc, e_sl, e_sm, e_valid, e_busy;
    if (ph < 0 && st) ph = 0;
    e_sel   = (ph < 0) ? 2'd0 : 2'(ph);
    e_lc    = (ph == 0) || (ph == 1);
    e_sl    = (ph == 0);
    e_sm    = (ph == 1);
    e_valid = (ph == 2);
    e_busy  = (ph >= 0);
    checks++;
    if ({2'(sel), ld_lc, ld_sl, ld_sm, valid, busy} !== {e_sel, e_lc, e_sl, e_sm, e_valid, e_busy}) begin
      failures++;
      $display("FAIL cycle %0d ph=%0d start=%0b: sel=%0d lc=%0b sl=%0b sm=%0b valid=%0b busy=%0b",
               cycles, ph, st, sel, ld_lc, ld_sl, ld_sm, valid, busy);
    end
  endtask

  initial begin
    int ph, start_cycle, ops, held_ops;
    ph = -1; ops = 0; held_ops = 0; start_cycle = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 1200; i++) begin
      @(negedge clk);
      start = (i >= 1000) ? 1'b1 : 1'($urandom_range(0, 3) == 0);
      #1;
      expect_outputs(ph, start);
      if (ph < 0 && start) start_cycle = cycles;
      if (ph == 2) begin
        ops++;
        if (i >= 1000) held_ops++;
        checks++;
        if (cycles - start_cycle != 2) begin
          failures++;
          $display("FAIL latency: valid %0d cycles after start", cycles - start_cycle);
        end
      end
      // advance the reference
      if (ph < 0) ph = start ? 1 : -1;
      else if (ph == 2) ph = -1;
      else ph = ph + 1;
    end
    // 200 cycles with start held high: one operation every three cycles
    checks++;
    if (held_ops < 66) begin
      failures++;
      $display("FAIL throughput: %0d operations in 200 cycles", held_ops);
    end
    $display("ctrl: %0d operations", ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
