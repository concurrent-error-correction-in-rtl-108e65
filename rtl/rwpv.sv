// rwpv: one iterative circuit with concurrent error correction by recomputing with
// partitioning and voting (RWPV).
//
// Idea: an N-unit iterative array (here an N-bit adder or ALU) is replaced by three
// copies of one third of it, ITL, ITM and ITH, each W = N/3 bits wide. The operands
// are cut into low, middle and high thirds and the computation is done in three
// phases, one third per phase. In every phase all three parts compute the same third,
// so their results can be voted bit by bit; any error confined to one part is masked.
// Because the delay of an iterative array is linear in its length, three passes
// through a third of the array take about as long as one pass through all of it.
//
//   phase 1 (PH_L): MUX1 of every part selects the low third of a and b; MUX2 gives
//     every part the external secondary input ext (carry in). VOTER votes the three
//     primary outputs and LATCH SL stores the result; each part's LC stores its own
//     secondary output (carry out of its third).
//   phase 2 (PH_M): middle thirds; each part continues from its own LC value. VOTER
//     output is stored in LATCH SM; LC store the new secondary outputs.
//   phase 3 (PH_H): high thirds, again from each part's own LC. The VOTER output is
//     the high third SH of the result and is not stored; V votes the three secondary
//     outputs to give the secondary output of the whole array (out).
// res = {SH, SM, SL} and out are valid while valid is high, in the third cycle of a
// computation; a, b and ctl must be held from the start cycle to that cycle (ext is
// read in the start cycle only). One result every three cycles with start held high.
//
// Parameters: CELL (unit cell, see rwpv_pkg) and N (array length in bits, a multiple
// of 3, and for the 4-bit cells of 12). The default N = 96 is the largest array size
// evaluated for this technique. ctl carries {M, S[3:0]} to the ALU cells.
// Error-injection inputs (this design's own test access, tie to zero in use): each
// part p has XOR masks on its a operand after MUX1 (inj_pi[p]), on its primary output
// before VOTER (inj_po[p]) and on its secondary output before LC and V (inj_so[p]).
// Own choices: one clock cycle per phase, LC and LATCH as enabled registers, V taking
// the parts' secondary outputs as they enter LC (what a transparent LC passes in phase
// 3), and the start/valid handshake of rwpv_ctrl.
module rwpv import rwpv_pkg::*; #(
  parameter cell_e       CELL = CELL_RIPPLE,
  parameter int unsigned N    = 96
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [N-1:0]           a,
  input  logic [N-1:0]           b,
  input  logic [CTL_W-1:0]       ctl,
  input  logic                   ext,
  input  logic [2:0][N/3-1:0]    inj_pi,
  input  logic [2:0][N/3-1:0]    inj_po,
  input  logic [2:0]             inj_so,
  output logic [N-1:0]           res,
  output logic                   out,
  output logic                   valid,
  output logic                   busy
);
  localparam int unsigned W = N / 3;

  if (N % 3 != 0 || N == 0) begin : g_bad_n
    $error("rwpv: N must be a nonzero multiple of 3");
  end

  phase_e sel;
  logic   ld_lc, ld_sl, ld_sm;

  rwpv_ctrl u_ctrl (
    .clk, .rst_n, .start, .sel, .ld_lc, .ld_sl, .ld_sm, .valid, .busy
  );

  logic [2:0][W-1:0] po_v;   // primary outputs of ITL, ITM, ITH (after injection)
  logic [2:0]        so_v;   // secondary outputs of ITL, ITM, ITH (after injection)

  for (genvar p = 0; p < 3; p++) begin : g_part
    logic [W-1:0] a_sel, b_sel, po;
    logic         si, so, lc_q;

    rwpv_mux3 #(.W(W)) u_mux1_a (
      .in_l (a[0 +: W]), .in_m (a[W +: W]), .in_h (a[2*W +: W]), .sel, .out (a_sel)
    );
    rwpv_mux3 #(.W(W)) u_mux1_b (
      .in_l (b[0 +: W]), .in_m (b[W +: W]), .in_h (b[2*W +: W]), .sel, .out (b_sel)
    );
    rwpv_mux2 #(.SW(1)) u_mux2 (
      .ext (ext), .lc (lc_q), .sel, .out (si)
    );
    rwpv_it_part #(.CELL(CELL), .W(W)) u_it (
      .a (a_sel ^ inj_pi[p]), .b (b_sel), .ctl, .si, .po, .so
    );
    assign po_v[p] = po ^ inj_po[p];
    assign so_v[p] = so ^ inj_so[p];

    rwpv_latch #(.W(1)) u_lc (
      .clk, .rst_n, .ld (ld_lc), .d (so_v[p]), .q (lc_q)
    );
  end

  logic [W-1:0] voted, sl_q, sm_q;

  rwpv_voter #(.W(W)) u_voter (
    .in0 (po_v[0]), .in1 (po_v[1]), .in2 (po_v[2]), .out (voted)
  );
  rwpv_latch #(.W(W)) u_latch_sl (
    .clk, .rst_n, .ld (ld_sl), .d (voted), .q (sl_q)
  );
  rwpv_latch #(.W(W)) u_latch_sm (
    .clk, .rst_n, .ld (ld_sm), .d (voted), .q (sm_q)
  );
  rwpv_voter #(.W(1)) u_v (
    .in0 (so_v[0]), .in1 (so_v[1]), .in2 (so_v[2]), .out (out)
  );

  assign res = {voted, sm_q, sl_q};

  // The operands are read over all three phases and must not change in between.
  a_operands_held: assert property (@(posedge clk) disable iff (!rst_n)
    (sel != PH_L) |-> ($stable(a) && $stable(b) && $stable(ctl)))
    else $error("rwpv: operands changed during a computation");
endmodule
