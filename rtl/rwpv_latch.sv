// rwpv_latch: storage latch of an RWPV iterative circuit. One module serves both kinds:
// LC, which holds a part's secondary output from one phase for the next, and LATCH,
// which holds the voted low (SL) and middle (SM) thirds of the result.
//
// It is built as an edge-triggered register with a load enable rather than a
// level-sensitive latch, so that the whole circuit runs from one clock with one phase
// per cycle: q takes d at the rising clock edge that ends a phase in which ld is high,
// and holds it otherwise. rst_n (asynchronous, active low) clears it.
// Interface: clk, rst_n, ld, W-bit d and q. One cycle from d to q.
module rwpv_latch #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end
endmodule
