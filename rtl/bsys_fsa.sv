// bsys_fsa: the control automaton that steps a row through one instruction.
//
// As in the original chip, lowering init sends the chip through three phases:
// reading operand A (CA), reading operand B (CB) and writing the result (CRI).
// The silicon derives these from three external clocks (K1-K3) per phase; this
// design uses one synchronous clock and spends one cycle per phase, so an
// instruction takes three cycles. A new init is accepted while idle or during
// the CRI phase, so instructions can follow back to back at one per three
// cycles. rdy (high when a new init would be accepted) and the per-phase
// outputs ca, cb, cri are brought out as status; the reset is this design's.
// Interface: init_n active-low start strobe (sampled at the clock edge);
// load is high in the cycle in which the instruction is to be captured.
module bsys_fsa
  import bsys_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init_n,
  output phase_e phase,
  output logic   load,
  output logic   rdy,
  output logic   ca,
  output logic   cb,
  output logic   cri
);

  phase_e state_q, state_d;

  assign rdy  = (state_q == PH_IDLE) || (state_q == PH_CRI);
  assign load = rdy && !init_n;

  always_comb begin
    unique case (state_q)
      PH_IDLE: state_d = load ? PH_CA : PH_IDLE;
      PH_CA:   state_d = PH_CB;
      PH_CB:   state_d = PH_CRI;
      PH_CRI:  state_d = load ? PH_CA : PH_IDLE;
      default: state_d = PH_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= PH_IDLE;
    else        state_q <= state_d;
  end

  assign phase = state_q;
  assign ca    = (state_q == PH_CA);
  assign cb    = (state_q == PH_CB);
  assign cri   = (state_q == PH_CRI);

endmodule
