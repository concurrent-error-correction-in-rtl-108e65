// rwpv_top: the three RWPV iterative circuits side by side, sharing only clock and
// reset:
//   ripp_*  N_RIPP-bit ripple carry adder       (one-bit full adder cells)
//   fadd_*  N_FADD-bit adder of 4-bit lookahead adder cells (74LS83 function), carry
//           rippling between cells
//   falu_*  N_FALU-bit ALU of 4-bit ALU cells (74LS181 function), carry rippling
//           between cells; falu_ctl = {M, S[3:0]} selects the function, falu_ext is
//           the active-low carry in (Cn) and falu_out the active-low carry out (Cn+N)
// Each circuit is an rwpv instance with its own start/valid handshake, operands,
// result and error-injection inputs (see rwpv for the timing: result in the third
// cycle after start, one result every three cycles). For the adders ext is the
// active-high carry in and out the carry out. The sizes default to 96 bits, the
// largest array length the technique was evaluated at; any multiple of 12 works.
module rwpv_top import rwpv_pkg::*; #(
  parameter int unsigned N_RIPP = 96,
  parameter int unsigned N_FADD = 96,
  parameter int unsigned N_FALU = 96
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // ripple carry adder
  input  logic                       ripp_start,
  input  logic [N_RIPP-1:0]          ripp_a,
  input  logic [N_RIPP-1:0]          ripp_b,
  input  logic                       ripp_ext,
  input  logic [2:0][N_RIPP/3-1:0]   ripp_inj_pi,
  input  logic [2:0][N_RIPP/3-1:0]   ripp_inj_po,
  input  logic [2:0]                 ripp_inj_so,
  output logic [N_RIPP-1:0]          ripp_res,
  output logic                       ripp_out,
  output logic                       ripp_valid,
  output logic                       ripp_busy,
  // lookahead-cell adder
  input  logic                       fadd_start,
  input  logic [N_FADD-1:0]          fadd_a,
  input  logic [N_FADD-1:0]          fadd_b,
  input  logic                       fadd_ext,
  input  logic [2:0][N_FADD/3-1:0]   fadd_inj_pi,
  input  logic [2:0][N_FADD/3-1:0]   fadd_inj_po,
  input  logic [2:0]                 fadd_inj_so,
  output logic [N_FADD-1:0]          fadd_res,
  output logic                       fadd_out,
  output logic                       fadd_valid,
  output logic                       fadd_busy,
  // ALU
  input  logic                       falu_start,
  input  logic [N_FALU-1:0]          falu_a,
  input  logic [N_FALU-1:0]          falu_b,
  input  logic [CTL_W-1:0]           falu_ctl,
  input  logic                       falu_ext,
  input  logic [2:0][N_FALU/3-1:0]   falu_inj_pi,
  input  logic [2:0][N_FALU/3-1:0]   falu_inj_po,
  input  logic [2:0]                 falu_inj_so,
  output logic [N_FALU-1:0]          falu_res,
  output logic                       falu_out,
  output logic                       falu_valid,
  output logic                       falu_busy
);
  rwpv #(.CELL(CELL_RIPPLE), .N(N_RIPP)) u_ripp (
    .clk, .rst_n, .start (ripp_start), .a (ripp_a), .b (ripp_b), .ctl ('0),
    .ext (ripp_ext), .inj_pi (ripp_inj_pi), .inj_po (ripp_inj_po),
    .inj_so (ripp_inj_so), .res (ripp_res), .out (ripp_out),
    .valid (ripp_valid), .busy (ripp_busy)
  );

  rwpv #(.CELL(CELL_CLA4), .N(N_FADD)) u_fadd (
    .clk, .rst_n, .start (fadd_start), .a (fadd_a), .b (fadd_b), .ctl ('0),
    .ext (fadd_ext), .inj_pi (fadd_inj_pi), .inj_po (fadd_inj_po),
    .inj_so (fadd_inj_so), .res (fadd_res), .out (fadd_out),
    .valid (fadd_valid), .busy (fadd_busy)
  );

  rwpv #(.CELL(CELL_ALU4), .N(N_FALU)) u_falu (
    .clk, .rst_n, .start (falu_start), .a (falu_a), .b (falu_b), .ctl (falu_ctl),
    .ext (falu_ext), .inj_pi (falu_inj_pi), .inj_po (falu_inj_po),
    .inj_so (falu_inj_so), .res (falu_res), .out (falu_out),
    .valid (falu_valid), .busy (falu_busy)
  );
endmodule
