// tb_rwpv_top: end-to-end test of the three 96-bit RWPV circuits at their default
// sizes (ripple adder, lookahead-cell adder, ALU), all running at once.
// Each operation drives random operands (and for the ALU a random function) and,
// per design, one of:
//   - no errors,
//   - errors confined to one part (ITL, ITM or ITH): XOR masks on its operand after
//     MUX1, its primary output and its secondary output, either held for the whole
//     operation (permanent fault) or redrawn every phase (transient errors);
//     the result must still be exact,
//   - the same primary-output error in two parts: a two-out-of-three vote cannot
//     mask that, and the result must differ from the exact one in those bits.
// It checks result and carry out in the valid cycle, the latency (valid in the third
// cycle of the operation) and the rate (start held high gives one result every three
// cycles), and counts how often each mechanism occurred: a mechanism that never
// occurred counts as a failure.
module tb_rwpv_top;
  import rwpv_pkg::*;
  import rwpv_tb_ref_pkg::*;
  localparam int unsigned N = 96;
  localparam int unsigned W = N / 3;
  localparam int OPS = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start [3];
  logic [N-1:0] a [3], b [3], res [3];
  logic [CTL_W-1:0] ctl = '0;
  logic ext [3], out [3], valid [3], busy [3];
  logic [2:0][W-1:0] inj_pi [3], inj_po [3];
  logic [2:0]        inj_so [3];
  int checks = 0, failures = 0, cycles = 0;
  // mechanism counters
  int n_ops = 0, n_part [3] = '{0, 0, 0}, n_transient = 0, n_perm = 0, n_clean = 0;
  int n_b2b = 0, n_double = 0, n_logic = 0, n_arith = 0, n_carry_out = 0;

  rwpv_top dut (
    .clk, .rst_n,
    .ripp_start (start[0]), .ripp_a (a[0]), .ripp_b (b[0]), .ripp_ext (ext[0]),
    .ripp_inj_pi (inj_pi[0]), .ripp_inj_po (inj_po[0]), .ripp_inj_so (inj_so[0]),
    .ripp_res (res[0]), .ripp_out (out[0]), .ripp_valid (valid[0]), .ripp_busy (busy[0]),
    .fadd_start (start[1]), .fadd_a (a[1]), .fadd_b (b[1]), .fadd_ext (ext[1]),
    .fadd_inj_pi (inj_pi[1]), .fadd_inj_po (inj_po[1]), .fadd_inj_so (inj_so[1]),
    .fadd_res (res[1]), .fadd_out (out[1]), .fadd_valid (valid[1]), .fadd_busy (busy[1]),
    .falu_start (start[2]), .falu_a (a[2]), .falu_b (b[2]), .falu_ctl (ctl),
    .falu_ext (ext[2]),
    .falu_inj_pi (inj_pi[2]), .falu_inj_po (inj_po[2]), .falu_inj_so (inj_so[2]),
    .falu_res (res[2]), .falu_out (out[2]), .falu_valid (valid[2]), .falu_busy (busy[2])
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 10 * OPS + 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mode per design: 0..2 errors in that part, 3 none, 4 same po error in two parts
  task automatic set_errors(input int d, input int mode, input int p2);
    logic [W-1:0] e;
    inj_pi[d] = '0; inj_po[d] = '0; inj_so[d] = '0;
    if (mode < 3) begin
      inj_pi[d][mode] = ($urandom_range(0, 1) == 0) ? W'($urandom) : '0;
      inj_po[d][mode] = ($urandom_range(0, 1) == 0) ? W'($urandom) : '0;
      inj_so[d][mode] = 1'($urandom);
    end else if (mode == 4) begin
      e = W'($urandom) | W'(1);
      inj_po[d][p2] = e;
      inj_po[d][(p2 + 1) % 3] = e;
    end
  endtask

  initial begin
    logic [N:0] sum;
    logic [N-1:0] exp_res;
    logic exp_out, known, transient, chk_out;
    logic [127:0] fr;
    int mode [3], p2 [3];
    int last_valid = -10, start_cycle;
    for (int d = 0; d < 3; d++) begin
      start[d] = 1'b0; a[d] = '0; b[d] = '0; ext[d] = 1'b0;
      set_errors(d, 3, 0);
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int op = 0; op < OPS; op++) begin
      @(negedge clk);
      // phase L
      transient = 1'($urandom);
      ctl = CTL_W'($urandom);
      if (op < 8) ctl = {1'b0, 4'b1001};
      for (int d = 0; d < 3; d++) begin
        a[d] = N'({$urandom, $urandom, $urandom});
        b[d] = N'({$urandom, $urandom, $urandom});
        ext[d] = 1'($urandom);
        if (op < 4) begin a[d] = '1; b[d] = '0; ext[d] = (d == 2) ? 1'b0 : 1'b1; end
        mode[d] = (op < 4) ? op % 4 : $urandom_range(0, 9);
        if (mode[d] > 4) mode[d] = mode[d] % 4;   // mostly single-part or no errors
        p2[d] = $urandom_range(0, 2);
        set_errors(d, mode[d], p2[d]);
        start[d] = 1'b1;
      end
      if (cycles == last_valid + 1) n_b2b++;
      start_cycle = cycles;
      #1;
      // phase M
      @(negedge clk);
      for (int d = 0; d < 3; d++) begin
        start[d] = 1'b0;
        if (transient && mode[d] < 3) set_errors(d, mode[d], p2[d]);
      end
      // phase H
      @(negedge clk);
      for (int d = 0; d < 3; d++)
        if (transient && mode[d] < 3) set_errors(d, mode[d], p2[d]);
      #1;
      checks++;
      if (cycles - start_cycle != 2) begin
        failures++; $display("FAIL latency %0d", cycles - start_cycle);
      end
      for (int d = 0; d < 3; d++) begin
        if (d < 2) begin
          sum = (N+1)'(a[d]) + (N+1)'(b[d]) + (N+1)'(ext[d]);
          exp_res = sum[N-1:0];
          exp_out = sum[N];
          chk_out = 1'b1;
        end else begin
          fr = alu_ref(128'(a[d]), 128'(b[d]), ctl[3:0], ctl[4], ~ext[d], N);
          exp_res = fr[N-1:0];
          exp_out = ~alu_carry(128'(a[d]), 128'(b[d]), ctl[3:0], ~ext[d], N, known);
          chk_out = known && !ctl[4];
          if (ctl[4]) n_logic++; else n_arith++;
        end
        checks++;
        if (!valid[d]) begin failures++; $display("FAIL design %0d not valid", d); end
        if (mode[d] == 4) begin
          // two parts agree on a wrong value: the vote must pass it through
          checks++;
          if ((res[d] ^ exp_res) == '0) begin
            failures++;
            $display("FAIL design %0d op %0d: double error not visible", d, op);
          end
          n_double++;
        end else begin
          checks++;
          if (res[d] !== exp_res) begin
            failures++;
            $display("FAIL design %0d op %0d mode %0d: res %h exp %h", d, op, mode[d], res[d], exp_res);
          end
          if (chk_out) begin
            checks++;
            if (out[d] !== exp_out) begin
              failures++; $display("FAIL design %0d op %0d: out %0b", d, op, out[d]);
            end
            if (d < 2 ? exp_out : !exp_out) n_carry_out++;
          end
          if (mode[d] < 3) begin
            n_part[mode[d]]++;
            if (transient) n_transient++; else n_perm++;
          end else n_clean++;
        end
      end
      last_valid = cycles;
      n_ops++;
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        for (int d = 0; d < 3; d++) set_errors(d, 3, 0);
      end
    end
    $display("ops=%0d errors in ITL=%0d ITM=%0d ITH=%0d permanent=%0d transient=%0d clean=%0d",
             n_ops, n_part[0], n_part[1], n_part[2], n_perm, n_transient, n_clean);
    $display("double errors=%0d back-to-back=%0d alu logic=%0d alu arith=%0d carry out=%0d",
             n_double, n_b2b, n_logic, n_arith, n_carry_out);
    checks++;
    if (n_part[0] == 0 || n_part[1] == 0 || n_part[2] == 0 || n_perm == 0 ||
        n_transient == 0 || n_clean == 0 || n_double == 0 || n_b2b == 0 ||
        n_logic == 0 || n_arith == 0 || n_carry_out == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    // rate: with start held high, the 30th result is valid in the 90th cycle
    begin
      int c0, done;
      @(negedge clk);
      for (int d = 0; d < 3; d++) begin set_errors(d, 3, 0); start[d] = 1'b1; end
      c0 = cycles; done = 0;
      while (done < 30) begin
        @(negedge clk);
        #1;
        if (valid[0] && valid[1] && valid[2]) done++;
      end
      checks++;
      if (cycles - c0 + 1 != 90) begin
        failures++; $display("FAIL rate: 30 results in %0d cycles", cycles - c0 + 1);
      end
      for (int d = 0; d < 3; d++) start[d] = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
