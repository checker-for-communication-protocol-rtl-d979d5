// ll_checker: on-line protocol checker for one LocalLink interface.
//
// The checker sits beside a LocalLink connection between two IP cores and
// only watches it. It takes the six active-low control signals (SOF_N,
// SOP_N, EOP_N, EOF_N, SRC_RDY_N, DST_RDY_N), decodes every clock cycle into
// one of the input symbols p0..p5 (llc_symbol_decoder) and runs the sequence
// automaton over them (llc_seq_fsm). Two kinds of fault are reported:
//   comb_error  the control signals of the last cycle formed a forbidden
//               combination (a transferred beat with more than one frame
//               marker active); one-cycle flag, one clock after that cycle;
//   error       the sequence of beats broke the SOF -> SOP -> EOP -> EOF
//               order, or a forbidden combination was seen; sticky until
//               reset, one clock after the offending cycle.
// The data bus and REM_N are not watched.
//
// Interface: clock, reset (synchronous, active high), the six control
// signals as plain inputs; error, comb_error, state (the automaton's state,
// llc_pkg::state_e) and sym (the symbol decoded in the current cycle) out.
//
// The port list (control signals, clock, reset in, error out) and the two
// levels of checking follow the generated checker. The registered
// comb_error flag and the extra state/sym outputs for diagnosis are this
// design's choices.
module ll_checker
  import llc_pkg::*;
(
  input  logic     clock,
  input  logic     reset,
  input  logic     sof_n,
  input  logic     sop_n,
  input  logic     eop_n,
  input  logic     eof_n,
  input  logic     src_rdy_n,
  input  logic     dst_rdy_n,
  output logic     error,
  output logic     comb_error,
  output state_e   state,
  output sym_vec_t sym
);

  ll_ctrl_t ctrl;
  logic     comb_bad;

  assign ctrl = '{sof_n: sof_n, sop_n: sop_n, eop_n: eop_n, eof_n: eof_n,
                  src_rdy_n: src_rdy_n, dst_rdy_n: dst_rdy_n};

  llc_symbol_decoder u_dec (
    .ctrl      (ctrl),
    .sym       (sym),
    .comb_error(comb_bad)
  );

  llc_seq_fsm u_fsm (
    .clock(clock),
    .reset(reset),
    .sym  (sym),
    .state(state),
    .error(error)
  );

  always_ff @(posedge clock) begin
    if (reset) comb_error <= 1'b0;
    else       comb_error <= comb_bad;
  end

endmodule
