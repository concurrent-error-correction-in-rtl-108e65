// rwpv_pkg: types and helpers shared by the recomputing-with-partitioning-and-voting
// (RWPV) iterative circuits.
//
// cell_e picks the unit cell that an iterative array is built from:
//   CELL_RIPPLE  one-bit full adder cell (ripple carry adder, one unit per bit)
//   CELL_CLA4    4-bit carry lookahead adder with the function of a 74LS83
//   CELL_ALU4    4-bit ALU with the function of a 74LS181
// phase_e names the three phases of one RWPV computation: in phase PH_L every part of
// the array works on the low third of the operands, in PH_M on the middle third and
// in PH_H on the high third. The encoding (0, 1, 2) is also the MUX1 select value.
package rwpv_pkg;

  typedef enum logic [1:0] {
    CELL_RIPPLE = 2'd0,
    CELL_CLA4   = 2'd1,
    CELL_ALU4   = 2'd2
  } cell_e;

  typedef enum logic [1:0] {
    PH_L = 2'd0,
    PH_M = 2'd1,
    PH_H = 2'd2
  } phase_e;

  // Bits handled by one unit cell of each kind.
  function automatic int unsigned cell_bits(cell_e c);
    return (c == CELL_RIPPLE) ? 1 : 4;
  endfunction

  // Width of the per-array control input: the ALU takes its function select S[3:0]
  // and mode M (all units share them); the adders take none, but keep one bit so
  // the port is never zero wide.
  localparam int unsigned CTL_W = 5;

endpackage
