// rwpv_mux3: MUX1, the 3-to-1 primary input multiplexer in front of each part of an
// RWPV iterative circuit.
//
// It picks the low (in_l), middle (in_m) or high (in_h) third of a primary input
// vector according to the phase select sel (PH_L, PH_M, PH_H). An out-of-range select
// (2'b11, never produced by the controller) gives the low third.
// Interface: W-bit inputs and output, 2-bit phase select. Combinational.
module rwpv_mux3 import rwpv_pkg::*; #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] in_l,
  input  logic [W-1:0] in_m,
  input  logic [W-1:0] in_h,
  input  phase_e       sel,
  output logic [W-1:0] out
);
  always_comb begin
    unique case (sel)
      PH_M:    out = in_m;
      PH_H:    out = in_h;
      default: out = in_l;
    endcase
  end
endmodule
