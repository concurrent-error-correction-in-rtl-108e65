// rwpv_size_check: testbench helper that runs the three RWPV circuits of rwpv_top at
// array length N (all three designs the same size) through OPS random operations,
// each with no errors or with random errors confined to one part, and checks every
// result and carry out against an exact reference. It reports its counts on its
// outputs and raises done when finished. Used by tb_rwpv_sizes.
module rwpv_size_check import rwpv_pkg::*; import rwpv_tb_ref_pkg::*; #(
  parameter int unsigned N   = 12,
  parameter int          OPS = 500
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   corrected
);
  localparam int unsigned W = N / 3;
  logic start [3];
  logic [N-1:0] a [3], b [3], res [3];
  logic [CTL_W-1:0] ctl;
  logic ext [3], out [3], valid [3], busy [3];
  logic [2:0][W-1:0] inj_pi [3], inj_po [3];
  logic [2:0]        inj_so [3];

  rwpv_top #(.N_RIPP(N), .N_FADD(N), .N_FALU(N)) dut (
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

  task automatic set_errors(input int d, input int p);
    inj_pi[d] = '0; inj_po[d] = '0; inj_so[d] = '0;
    if (p < 3) begin
      inj_pi[d][p] = W'({$urandom, $urandom});
      inj_po[d][p] = W'({$urandom, $urandom});
      inj_so[d][p] = 1'($urandom);
    end
  endtask

  initial begin
    logic [N:0] sum;
    logic [127:0] fr;
    logic exp_out, known;
    int part [3];
    done = 1'b0; checks = 0; failures = 0; corrected = 0; ctl = '0;
    for (int d = 0; d < 3; d++) begin
      start[d] = 1'b0; a[d] = '0; b[d] = '0; ext[d] = 1'b0; set_errors(d, 3);
    end
    @(posedge rst_n);
    for (int op = 0; op < OPS; op++) begin
      @(negedge clk);
      ctl = CTL_W'($urandom);
      for (int d = 0; d < 3; d++) begin
        a[d] = N'({$urandom, $urandom, $urandom, $urandom});
        b[d] = N'({$urandom, $urandom, $urandom, $urandom});
        ext[d] = 1'($urandom);
        part[d] = $urandom_range(0, 3);
        set_errors(d, part[d]);
        start[d] = 1'b1;
      end
      @(negedge clk);
      for (int d = 0; d < 3; d++) start[d] = 1'b0;
      @(negedge clk);
      #1;
      for (int d = 0; d < 3; d++) begin
        checks++;
        if (!valid[d]) failures++;
        if (d < 2) begin
          sum = (N+1)'(a[d]) + (N+1)'(b[d]) + (N+1)'(ext[d]);
          checks++;
          if ({out[d], res[d]} !== sum) begin
            failures++;
            $display("FAIL N=%0d design %0d: %0b %h exp %h", N, d, out[d], res[d], sum);
          end
        end else begin
          fr = alu_ref(128'(a[d]), 128'(b[d]), ctl[3:0], ctl[4], ~ext[d], N);
          checks++;
          if (res[d] !== fr[N-1:0]) begin
            failures++;
            $display("FAIL N=%0d alu s=%b m=%0b: %h exp %h", N, ctl[3:0], ctl[4], res[d], fr[N-1:0]);
          end
          exp_out = ~alu_carry(128'(a[d]), 128'(b[d]), ctl[3:0], ~ext[d], N, known);
          if (known && !ctl[4]) begin
            checks++;
            if (out[d] !== exp_out) failures++;
          end
        end
        if (part[d] < 3) corrected++;
      end
    end
    done = 1'b1;
  end
endmodule
