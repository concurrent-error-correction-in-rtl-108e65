// rwpv_voter: bitwise two-out-of-three majority voter. The RWPV circuit uses a W-bit
// instance as VOTER on the primary outputs of the three parts and one-bit instances
// as V on their secondary outputs.
//
// Each output bit is 1 when at least two of the three input bits are 1, so any error
// confined to one input is masked. Interface: three W-bit inputs, W-bit output.
// Combinational.
module rwpv_voter #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  output logic [W-1:0] out
);
  always_comb out = (in0 & in1) | (in0 & in2) | (in1 & in2);
endmodule
