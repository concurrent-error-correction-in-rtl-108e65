// rwpv_mux2: MUX2, the 2-to-1 secondary input multiplexer of each part of an RWPV
// iterative circuit.
//
// In the first phase (PH_L) the part's secondary input comes from outside (ext, the
// value the whole array would receive at its first unit, e.g. the carry in). In the
// later phases it comes from the part's own latched secondary output (lc), so that
// the part continues the computation where it stopped in the previous phase.
// Interface: SW-bit inputs and output, 2-bit phase select. Combinational.
module rwpv_mux2 import rwpv_pkg::*; #(
  parameter int unsigned SW = 1
) (
  input  logic [SW-1:0] ext,
  input  logic [SW-1:0] lc,
  input  phase_e        sel,
  output logic [SW-1:0] out
);
  always_comb out = (sel == PH_L) ? ext : lc;
endmodule
