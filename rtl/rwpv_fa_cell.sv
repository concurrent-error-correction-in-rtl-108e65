// rwpv_fa_cell: one unit of the ripple carry adder, the example iterative cell.
//
// The sum is two cascaded 2-input XORs (a^b, then ^ci); the carry is three 2-input
// NANDs: ~(a&b), ~((a^b)&ci) and a NAND of those two, so co = a&b | (a^b)&ci. This is
// the gate structure of the ripple carry adder cell the design is built around; the
// intermediate a^b feeds both the sum XOR and the carry NAND.
// Interface: primary inputs a, b; secondary input ci (carry from the unit below);
// primary output s; secondary output co (carry to the unit above). Purely
// combinational: co settles after the a^b XOR and two NAND levels.
module rwpv_fa_cell (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p, n_ab, n_pc;

  always_comb begin
    p    = a ^ b;
    s    = p ^ ci;
    n_ab = ~(a & b);
    n_pc = ~(p & ci);
    co   = ~(n_ab & n_pc);
  end
endmodule
