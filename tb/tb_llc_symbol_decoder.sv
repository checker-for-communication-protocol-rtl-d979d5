// tb_llc_symbol_decoder: exhaustive self-checking test of llc_symbol_decoder.
//
// Applies all 64 combinations of the six control signals. The expected
// symbol is worked out here from the LocalLink rules: when either ready
// signal is inactive the cycle is "no transfer" (p5); otherwise the number of
// active frame markers decides: none is a data beat (p4), exactly one names
// its symbol (SOF p0, SOP p1, EOP p2, EOF p3), and more than one is a
// forbidden combination with no symbol and comb_error set.
module tb_llc_symbol_decoder;
  import llc_pkg::*;

  int checks = 0;
  int failures = 0;

  ll_ctrl_t ctrl;
  sym_vec_t sym;
  logic     comb_error;

  llc_symbol_decoder dut (.ctrl(ctrl), .sym(sym), .comb_error(comb_error));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_vec_t exp_sym;
    int       n_active;
    for (int v = 0; v < 64; v++) begin
      ctrl = ll_ctrl_t'(6'(v));
      #1;
      exp_sym = '0;
      if (ctrl.src_rdy_n || ctrl.dst_rdy_n) begin
        exp_sym[SYM_IDLE] = 1'b1;
      end else begin
        n_active = int'(!ctrl.sof_n) + int'(!ctrl.sop_n) + int'(!ctrl.eop_n) + int'(!ctrl.eof_n);
        if (n_active == 0)       exp_sym[SYM_DATA] = 1'b1;
        else if (n_active == 1) begin
          if (!ctrl.sof_n) exp_sym[SYM_SOF] = 1'b1;
          if (!ctrl.sop_n) exp_sym[SYM_SOP] = 1'b1;
          if (!ctrl.eop_n) exp_sym[SYM_EOP] = 1'b1;
          if (!ctrl.eof_n) exp_sym[SYM_EOF] = 1'b1;
        end
      end
      checks++;
      if (sym !== exp_sym) begin
        failures++;
        $display("FAIL ctrl=%06b sym=%06b expected %06b", 6'(v), sym, exp_sym);
      end
      checks++;
      if (comb_error !== (exp_sym == '0)) begin
        failures++;
        $display("FAIL ctrl=%06b comb_error=%0b", 6'(v), comb_error);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
