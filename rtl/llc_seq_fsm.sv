// llc_seq_fsm: sequence checker automaton for LocalLink frames.
//
// A deterministic automaton A = (Q, T, P, S0, Serr) whose input alphabet is
// the symbols p0..p5 of llc_symbol_decoder. It follows the frame order
// SOF -> SOP -> EOP -> EOF:
//   S0 (between frames):  p5 -> S0,  p0 (SOF) -> S1
//   S1 (header):          p5 -> S1,  p4 -> S1,  p1 (SOP) -> S2
//   S2 (payload):         p5 -> S2,  p4 -> S2,  p2 (EOP) -> S3
//   S3 (footer):          p5 -> S3,  p4 -> S3,  p3 (EOF) -> S0
// Any other symbol, including a cycle with no symbol at all (a forbidden
// combination), leads to Serr. Serr is the final state: it is left only by
// reset, so error stays high once a violation has been seen.
//
// As in the generated checkers, the automaton is two processes: a register
// holding the current state and combinational next-state logic.
//
// Interface: clock, reset (synchronous, active high), sym (one bit per
// symbol); state and error out. Timing: the state after a beat is visible one
// clock later, so error rises in the cycle after the offending beat.
//
// The transition table and the final error state follow the checker's
// definition. The synchronous active-high reset, the absorbing Serr and the
// registered error output are this design's choices.
module llc_seq_fsm
  import llc_pkg::*;
(
  input  logic     clock,
  input  logic     reset,
  input  sym_vec_t sym,
  output state_e   state,
  output logic     error
);

  state_e state_q, state_d;

  // State register.
  always_ff @(posedge clock) begin
    if (reset) state_q <= ST_S0;
    else       state_q <= state_d;
  end

  // Transition function P : Q x T -> Q.
  always_comb begin
    state_d = ST_SERR;
    unique case (state_q)
      ST_S0: begin
        if      (sym[SYM_IDLE]) state_d = ST_S0;
        else if (sym[SYM_SOF])  state_d = ST_S1;
      end
      ST_S1: begin
        if      (sym[SYM_IDLE]) state_d = ST_S1;
        else if (sym[SYM_DATA]) state_d = ST_S1;
        else if (sym[SYM_SOP])  state_d = ST_S2;
      end
      ST_S2: begin
        if      (sym[SYM_IDLE]) state_d = ST_S2;
        else if (sym[SYM_DATA]) state_d = ST_S2;
        else if (sym[SYM_EOP])  state_d = ST_S3;
      end
      ST_S3: begin
        if      (sym[SYM_IDLE]) state_d = ST_S3;
        else if (sym[SYM_DATA]) state_d = ST_S3;
        else if (sym[SYM_EOF])  state_d = ST_S0;
      end
      default: state_d = ST_SERR;
    endcase
  end

  assign state = state_q;
  assign error = (state_q == ST_SERR);

  // Serr is final: once entered it is left only by reset.
  property p_serr_final;
    @(posedge clock) disable iff (reset) (state_q == ST_SERR) |=> (state_q == ST_SERR);
  endproperty
  a_serr_final: assert property (p_serr_final);

endmodule
