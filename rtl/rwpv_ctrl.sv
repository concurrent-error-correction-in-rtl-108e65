// rwpv_ctrl: phase sequencer of an RWPV iterative circuit.
//
// One computation takes three phases of one clock cycle each. Phase 1 (PH_L) is the
// cycle in which start is high while the sequencer is idle; phases 2 (PH_M) and 3
// (PH_H) follow in the next two cycles, and then the sequencer is idle again. Holding
// start high therefore runs one computation every three cycles with no gap.
// Outputs per phase:
//   PH_L : sel = PH_L, ld_lc = 1 (LC keep the parts' secondary outputs), ld_sl = 1
//   PH_M : sel = PH_M, ld_lc = 1, ld_sm = 1
//   PH_H : sel = PH_H, valid = 1 (the complete result is on the outputs, unlatched)
// While idle, sel rests at PH_L and no load is enabled unless start is high.
// The three-phase order follows the design; the start/valid handshake, the idle
// state and reset to idle (rst_n, asynchronous, active low) are this design's own.
module rwpv_ctrl import rwpv_pkg::*; (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output phase_e sel,
  output logic   ld_lc,
  output logic   ld_sl,
  output logic   ld_sm,
  output logic   valid,
  output logic   busy
);
  typedef enum logic [1:0] {S_IDLE = 2'd0, S_M = 2'd1, S_H = 2'd2} state_e;
  state_e state, state_nx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;
  end

  always_comb begin
    sel      = PH_L;
    ld_lc    = 1'b0;
    ld_sl    = 1'b0;
    ld_sm    = 1'b0;
    valid    = 1'b0;
    busy     = 1'b1;
    state_nx = state;
    unique case (state)
      S_IDLE: begin
        busy  = start;
        ld_lc = start;
        ld_sl = start;
        if (start) state_nx = S_M;
      end
      S_M: begin
        sel      = PH_M;
        ld_lc    = 1'b1;
        ld_sm    = 1'b1;
        state_nx = S_H;
      end
      S_H: begin
        sel      = PH_H;
        valid    = 1'b1;
        state_nx = S_IDLE;
      end
      default: state_nx = S_IDLE;
    endcase
  end
endmodule
