// rwpv_it_part: one part (ITL, ITM or ITH) of an RWPV iterative circuit: a linear chain
// of identical unit cells covering W bits, one third of the full N-bit array.
//
// The secondary output of each unit is the secondary input of the unit above it; the
// part's secondary input si enters the lowest unit and the secondary output so leaves
// the highest. The unit cell is chosen by CELL:
//   CELL_RIPPLE  W one-bit full adder cells (rwpv_fa_cell); si/so are active-high carries
//   CELL_CLA4    W/4 lookahead adder cells (rwpv_cla4);     si/so are active-high carries
//   CELL_ALU4    W/4 ALU cells (rwpv_alu4); si/so are the cells' active-low carries
//                (Cn in, Cn+4 out), and ctl = {M, S[3:0]} goes to every cell unchanged
// The adders do not use ctl. The per-cell group propagate/generate and A=B outputs of
// the ALU cells are left unused: the cells are chained by ripple carry.
// Interface: a, b (W-bit primary inputs), ctl, si; po (W-bit primary output), so.
// Combinational; the delay grows linearly with the number of cells.
module rwpv_it_part import rwpv_pkg::*; #(
  parameter cell_e       CELL = CELL_RIPPLE,
  parameter int unsigned W    = 32
) (
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  input  logic [CTL_W-1:0] ctl,
  input  logic             si,
  output logic [W-1:0]     po,
  output logic             so
);
  localparam int unsigned CB    = cell_bits(CELL);
  localparam int unsigned UNITS = W / CB;

  if (W % CB != 0 || W == 0) begin : g_bad_width
    $error("rwpv_it_part: W must be a nonzero multiple of the cell width");
  end

  // chain[i] is the secondary signal entering unit i; chain[UNITS] leaves the part.
  logic [UNITS:0] chain;
  assign chain[0] = si;
  assign so       = chain[UNITS];

  for (genvar i = 0; i < UNITS; i++) begin : g_unit
    if (CELL == CELL_RIPPLE) begin : g_fa
      rwpv_fa_cell u_cell (
        .a (a[i]), .b (b[i]), .ci (chain[i]), .s (po[i]), .co (chain[i+1])
      );
    end else if (CELL == CELL_CLA4) begin : g_cla
      rwpv_cla4 u_cell (
        .a  (a[i*4 +: 4]), .b (b[i*4 +: 4]), .c0 (chain[i]),
        .s  (po[i*4 +: 4]), .c4 (chain[i+1])
      );
    end else begin : g_alu
      logic p_n_unused, g_n_unused, aeqb_unused;
      rwpv_alu4 u_cell (
        .a     (a[i*4 +: 4]), .b (b[i*4 +: 4]), .s (ctl[3:0]), .m (ctl[4]),
        .cn_n  (chain[i]),    .f (po[i*4 +: 4]), .cn4_n (chain[i+1]),
        .p_n   (p_n_unused),  .g_n (g_n_unused), .aeqb (aeqb_unused)
      );
    end
  end
endmodule
