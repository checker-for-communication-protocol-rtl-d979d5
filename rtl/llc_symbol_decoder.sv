// llc_symbol_decoder: input symbols p0..p5 and combination check for LocalLink.
//
// Each input symbol of the checker is a combination of conditions on the
// six active-low control signals. While a beat is transferred (SRC_RDY_N and
// DST_RDY_N both low) exactly one of the frame markers may be active, or none:
//   p0  SOF_N=0, SOP_N=1, EOP_N=1, EOF_N=1   first beat of a frame
//   p1  SOF_N=1, SOP_N=0, EOP_N=1, EOF_N=1   first beat of the payload
//   p2  SOF_N=1, SOP_N=1, EOP_N=0, EOF_N=1   last beat of the payload
//   p3  SOF_N=1, SOP_N=1, EOP_N=1, EOF_N=0   last beat of a frame
//   p4  SOF_N=1, SOP_N=1, EOP_N=1, EOF_N=1   data beat
// each ANDed with SRC_RDY_N=0 and DST_RDY_N=0, and
//   p5  SRC_RDY_N<>0 or DST_RDY_N<>0         no beat this cycle.
// Every symbol is an AND (p0..p4) or OR (p5) of llc_condition instances, one
// per signal, the way a generated checker gives every symbol its own piece
// of logic. The symbols are mutually exclusive. A cycle in which none of them
// holds is a forbidden combination of control signals, flagged on
// comb_error: this is the combination-level check of the checker.
//
// Interface: ctrl (llc_pkg::ll_ctrl_t) in; sym (one bit per symbol, indexed
// by llc_pkg::sym_e) and comb_error out. Timing: purely combinational.
//
// The symbol definitions p0..p4 follow the LocalLink rules the checker is
// built for. p5 is taken as "at least one of the two ready signals is
// inactive", so that the symbols do not overlap and the automaton stays
// deterministic.
module llc_symbol_decoder
  import llc_pkg::*;
(
  input  ll_ctrl_t ctrl,
  output sym_vec_t sym,
  output logic     comb_error
);

  // Required values of {SOF_N, SOP_N, EOP_N, EOF_N} for p0..p4.
  localparam logic [3:0] MARK [5] = '{4'b0111, 4'b1011, 4'b1101, 4'b1110, 4'b1111};

  // p0..p4: conjunction of six equality conditions each.
  for (genvar s = 0; s < 5; s++) begin : g_beat_sym
    logic [5:0] c;
    llc_condition #(.WIDTH(1), .OP(OP_EQ), .VALUE(1'b0)) u_src (.sig(ctrl.src_rdy_n), .hit(c[0]));
    llc_condition #(.WIDTH(1), .OP(OP_EQ), .VALUE(1'b0)) u_dst (.sig(ctrl.dst_rdy_n), .hit(c[1]));
    llc_condition #(.WIDTH(1), .OP(OP_EQ), .VALUE(MARK[s][3])) u_sof (.sig(ctrl.sof_n), .hit(c[2]));
    llc_condition #(.WIDTH(1), .OP(OP_EQ), .VALUE(MARK[s][2])) u_sop (.sig(ctrl.sop_n), .hit(c[3]));
    llc_condition #(.WIDTH(1), .OP(OP_EQ), .VALUE(MARK[s][1])) u_eop (.sig(ctrl.eop_n), .hit(c[4]));
    llc_condition #(.WIDTH(1), .OP(OP_EQ), .VALUE(MARK[s][0])) u_eof (.sig(ctrl.eof_n), .hit(c[5]));
    assign sym[s] = &c;
  end

  // p5: disjunction of two inequality conditions.
  logic idle_src, idle_dst;
  llc_condition #(.WIDTH(1), .OP(OP_NE), .VALUE(1'b0)) u_idle_src (.sig(ctrl.src_rdy_n), .hit(idle_src));
  llc_condition #(.WIDTH(1), .OP(OP_NE), .VALUE(1'b0)) u_idle_dst (.sig(ctrl.dst_rdy_n), .hit(idle_dst));
  assign sym[SYM_IDLE] = idle_src | idle_dst;

  assign comb_error = (sym == '0);

  // The symbols never overlap.
  always_comb begin
    assert ($onehot0(sym)) else $error("llc_symbol_decoder: overlapping input symbols %b", sym);
  end

endmodule
