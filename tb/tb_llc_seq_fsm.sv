// tb_llc_seq_fsm: self-checking random test of llc_seq_fsm.
//
// Feeds the automaton a random stream of symbols, biased so that most frames
// are legal and now and then a wrong marker, a data beat between frames or an
// empty symbol vector (forbidden combination) appears. A reference model kept
// here as "which marker is expected next" plus an error flag predicts the
// state and the error output after every clock. Reset is applied every few
// hundred cycles to leave the error state again. Also checks that error rises
// exactly one clock after the offending symbol and that the automaton passes
// through every state.
module tb_llc_seq_fsm;
  import llc_pkg::*;

  int checks = 0;
  int failures = 0;

  logic     clock = 1'b0;
  logic     reset;
  sym_vec_t sym;
  state_e   state;
  logic     error;

  llc_seq_fsm dut (.clock(clock), .reset(reset), .sym(sym), .state(state), .error(error));

  always #5 clock = ~clock;

  initial begin : watchdog
    repeat (50000) @(posedge clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model: next expected marker (0 SOF, 1 SOP, 2 EOP, 3 EOF).
  int   exp_next;
  logic exp_err;
  int   visits [5];
  int   errors_seen;

  function automatic state_e ref_state(int nxt, logic err);
    if (err) return ST_SERR;
    return state_e'(3'(nxt));
  endfunction

  task automatic step_ref(sym_vec_t s);
    if (exp_err) return;
    if (s[SYM_IDLE]) return;
    if (s[SYM_DATA] && exp_next != 0) return;
    for (int k = 0; k < 4; k++) begin
      if (s[k] && k == exp_next) begin
        exp_next = (exp_next + 1) % 4;
        return;
      end
    end
    exp_err = 1'b1;
  endtask

  function automatic sym_vec_t pick_sym(int nxt);
    int r = $urandom_range(0, 999);
    sym_vec_t s = '0;
    if (r < 350)      s[SYM_IDLE] = 1'b1;
    else if (r < 700) s[(nxt == 0) ? SYM_IDLE : SYM_DATA] = 1'b1;
    else if (r < 994) s[nxt] = 1'b1;
    else if (r < 997) s[$urandom_range(0, 3)] = 1'b1;   // marker, maybe out of order
    else if (r < 999) s[SYM_DATA] = 1'b1;               // data, maybe between frames
    // else: empty vector, a forbidden combination
    return s;
  endfunction

  initial begin
    logic prev_err;
    sym = '0;
    sym[SYM_IDLE] = 1'b1;
    reset = 1'b1;
    repeat (2) @(posedge clock);
    #1 reset = 1'b0;
    exp_next = 0;
    exp_err = 1'b0;
    checks++;
    if (state !== ST_S0 || error !== 1'b0) begin
      failures++;
      $display("FAIL after reset state=%s error=%0b", state.name(), error);
    end
    for (int cyc = 0; cyc < 20000; cyc++) begin
      if (cyc % 300 == 299) begin
        reset = 1'b1;
        @(posedge clock);
        #1 reset = 1'b0;
        exp_next = 0;
        exp_err = 1'b0;
      end
      sym = pick_sym(exp_next);
      prev_err = exp_err;
      step_ref(sym);
      @(posedge clock);
      #1;
      checks++;
      if (state !== ref_state(exp_next, exp_err) || error !== exp_err) begin
        failures++;
        $display("FAIL cycle %0d sym=%06b state=%s error=%0b expected %s/%0b",
                 cyc, sym, state.name(), error, ref_state(exp_next, exp_err).name(), exp_err);
      end
      if (exp_err && !prev_err) errors_seen++;
      visits[int'(state)]++;
    end
    for (int q = 0; q < 5; q++) begin
      checks++;
      if (visits[q] == 0) begin
        failures++;
        $display("FAIL state %0d never visited", q);
      end
    end
    checks++;
    if (errors_seen == 0) begin
      failures++;
      $display("FAIL no error ever detected");
    end
    $display("visits S0=%0d S1=%0d S2=%0d S3=%0d Serr=%0d, violations=%0d",
             visits[0], visits[1], visits[2], visits[3], visits[4], errors_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
