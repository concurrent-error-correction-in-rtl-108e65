// tb_rwpv: end-to-end check of the RWPV circuit with each unit cell (N = 24, so each
// part is 8 bits: 8 full adders, 2 lookahead cells or 2 ALU cells).
// Every operation drives random operands and, in most operations, random errors
// confined to one part (ITL, ITM or ITH): XOR masks on that part's operand after MUX1,
// on its primary output and on its secondary output, held over all three phases
// (a permanent fault) or changed every phase (transient errors). The voted result
// {SH, SM, SL} and the voted secondary output must equal the error-free value in the
// valid cycle, which must be the third cycle of the operation. Operations run back to
// back with start held high, and also with idle gaps.
module tb_rwpv;
  import rwpv_pkg::*;
  import rwpv_tb_ref_pkg::*;
  localparam int unsigned N = 24;
  localparam int unsigned W = N / 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] a = '0, b = '0;
  logic [CTL_W-1:0] ctl = '0;
  logic ext = 1'b0;
  logic [2:0][W-1:0] inj_pi [3], inj_po [3];
  logic [2:0]        inj_so [3];
  logic [N-1:0] res [3];
  logic out [3], valid [3], busy [3];
  int checks = 0, failures = 0, cycles = 0;
  int n_ops = 0, n_fault_part [3] = '{0, 0, 0}, n_transient = 0, n_b2b = 0, n_clean = 0;
  int n_corrected = 0;

  rwpv #(.CELL(CELL_RIPPLE), .N(N)) dut_r (
    .clk, .rst_n, .start, .a, .b, .ctl, .ext, .inj_pi (inj_pi[0]), .inj_po (inj_po[0]),
    .inj_so (inj_so[0]), .res (res[0]), .out (out[0]), .valid (valid[0]), .busy (busy[0]));
  rwpv #(.CELL(CELL_CLA4), .N(N)) dut_c (
    .clk, .rst_n, .start, .a, .b, .ctl, .ext, .inj_pi (inj_pi[1]), .inj_po (inj_po[1]),
    .inj_so (inj_so[1]), .res (res[1]), .out (out[1]), .valid (valid[1]), .busy (busy[1]));
  rwpv #(.CELL(CELL_ALU4), .N(N)) dut_a (
    .clk, .rst_n, .start, .a, .b, .ctl, .ext, .inj_pi (inj_pi[2]), .inj_po (inj_po[2]),
    .inj_so (inj_so[2]), .res (res[2]), .out (out[2]), .valid (valid[2]), .busy (busy[2]));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random errors for one design, confined to part p (p = 3: no errors).
  task automatic set_errors(input int d, input int p);
    inj_pi[d] = '0; inj_po[d] = '0; inj_so[d] = '0;
    if (p < 3) begin
      inj_pi[d][p] = ($urandom_range(0, 1) == 0) ? W'($urandom) : '0;
      inj_po[d][p] = ($urandom_range(0, 1) == 0) ? W'($urandom) : '0;
      inj_so[d][p] = 1'($urandom);
    end
  endtask

  initial begin
    logic [N:0] sum;
    logic [127:0] fr;
    logic cr, known, transient;
    int part [3];
    int last_valid = 0;
    for (int d = 0; d < 3; d++) set_errors(d, 3);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int op = 0; op < 1500; op++) begin
      // phase L: operands, carry in, errors, start
      @(negedge clk);
      a = N'({$urandom, $urandom}); b = N'({$urandom, $urandom});
      ctl = CTL_W'($urandom); ext = 1'($urandom);
      if (op < 3) begin a = '1; b = '0; ext = 1'b1; ctl = {1'b0, 4'b1001}; end
      transient = 1'($urandom);
      for (int d = 0; d < 3; d++) begin
        part[d] = $urandom_range(0, 3);
        set_errors(d, part[d]);
      end
      if (op > 0 && cycles == last_valid + 1) n_b2b++;
      start = 1'b1;
      #1;
      if (valid[0] || valid[1] || valid[2]) begin
        checks++; failures++; $display("FAIL valid in phase L");
      end
      // phase M
      @(negedge clk);
      start = 1'b0;
      if (transient) for (int d = 0; d < 3; d++) set_errors(d, part[d]);
      #1;
      if (valid[0] || valid[1] || valid[2]) begin
        checks++; failures++; $display("FAIL valid in phase M");
      end
      // phase H: the result must be valid now
      @(negedge clk);
      if (transient) for (int d = 0; d < 3; d++) set_errors(d, part[d]);
      #1;
      sum = (N+1)'(a) + (N+1)'(b) + (N+1)'(ext);
      for (int d = 0; d < 3; d++) begin
        checks++;
        if (!valid[d]) begin
          failures++; $display("FAIL design %0d: valid not in the third cycle", d);
        end
        if (d < 2) begin
          checks++;
          if ({out[d], res[d]} !== sum) begin
            failures++;
            $display("FAIL design %0d op %0d part %0d: a=%h b=%h ext=%0b -> %0b %h exp %h",
                     d, op, part[d], a, b, ext, out[d], res[d], sum);
          end
        end else begin
          fr = alu_ref(128'(a), 128'(b), ctl[3:0], ctl[4], ~ext, N);
          checks++;
          if (res[d] !== fr[N-1:0]) begin
            failures++;
            $display("FAIL alu op %0d part %0d: m=%0b s=%b a=%h b=%h -> %h exp %h",
                     op, part[d], ctl[4], ctl[3:0], a, b, res[d], fr[N-1:0]);
          end
          cr = alu_carry(128'(a), 128'(b), ctl[3:0], ~ext, N, known);
          if (known && !ctl[4]) begin
            checks++;
            if (out[d] !== ~cr) begin
              failures++; $display("FAIL alu carry op %0d", op);
            end
          end
        end
        n_fault_part[part[d] == 3 ? 0 : part[d]] += (part[d] < 3) ? 1 : 0;
        if (part[d] < 3) n_corrected++; else n_clean++;
      end
      if (transient) n_transient++;
      last_valid = cycles;
      n_ops++;
      // Keep start high into the next phase L for back-to-back runs, or leave gaps.
      if ($urandom_range(0, 2) == 0) begin
        @(negedge clk);
        for (int d = 0; d < 3; d++) set_errors(d, 3);
      end
    end
    start = 1'b0;
    $display("ops=%0d with errors in ITL=%0d ITM=%0d ITH=%0d, error-free=%0d, transient=%0d, back-to-back=%0d",
             n_ops, n_fault_part[0], n_fault_part[1], n_fault_part[2], n_clean, n_transient, n_b2b);
    checks++;
    if (n_fault_part[0] == 0 || n_fault_part[1] == 0 || n_fault_part[2] == 0 ||
        n_transient == 0 || n_b2b == 0 || n_clean == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
