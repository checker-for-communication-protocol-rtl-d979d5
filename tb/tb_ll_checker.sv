// tb_ll_checker: end-to-end self-checking test of the LocalLink checker.
//
// A LocalLink source/destination pair is modelled here. The source sends
// frames made of a SOF beat, a few header beats, a SOP beat, payload beats,
// an EOP beat, footer beats and an EOF beat; both sides throttle the link at
// random with SRC_RDY_N and DST_RDY_N, and while no beat is transferred the
// frame markers either hold the pending beat or carry random values, which the
// checker must ignore. Some frames carry one injected fault:
//   - an extra frame marker on a transferred beat (forbidden combination),
//   - SOP dropped, so the payload's EOP comes out of order,
//   - a data beat between frames,
//   - a second SOF inside a frame.
// A reference model written here from the protocol rules predicts error,
// comb_error and state one clock after every cycle. After a detected fault
// the checker is reset and must start clean.
//
// The run starts with the example frame of the LocalLink timing diagram
// (SOF with H0, SOP with H1/P0, P1..P3, EOP with P4/F0, F1, EOF with F2),
// which must pass with the state sequence S1 S2 S2 S2 S2 S3 S3 S0 and no
// error. Every mechanism (each transition of the automaton, throttling on
// either side, ignored markers on idle cycles, both kinds of fault, recovery
// by reset) is counted and must occur at least once.
module tb_ll_checker;
  import llc_pkg::*;

  int checks = 0;
  int failures = 0;

  logic     clock = 1'b0;
  logic     reset;
  logic     sof_n, sop_n, eop_n, eof_n, src_rdy_n, dst_rdy_n;
  logic     error, comb_error;
  state_e   state;
  sym_vec_t sym;

  ll_checker dut (
    .clock(clock), .reset(reset),
    .sof_n(sof_n), .sop_n(sop_n), .eop_n(eop_n), .eof_n(eof_n),
    .src_rdy_n(src_rdy_n), .dst_rdy_n(dst_rdy_n),
    .error(error), .comb_error(comb_error), .state(state), .sym(sym)
  );

  always #5 clock = ~clock;

  localparam int NUM_FRAMES = 3000;

  initial begin : watchdog
    repeat (400000) @(posedge clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  int   m_pos;    // next marker expected: 0 SOF, 1 SOP, 2 EOP, 3 EOF
  logic m_err;    // sticky sequence error
  logic m_comb;   // forbidden combination in the last cycle

  // Mechanism counters.
  int n_idle [4];      // idle cycles seen in S0..S3
  int n_data [4];      // data beats in S1..S3 (index 0 unused)
  int n_mark [4];      // SOF, SOP, EOP, EOF accepted
  int n_src_stall, n_dst_stall, n_ignored;
  int n_comb_fault, n_seq_fault, n_recover;

  task automatic model_step(logic [3:0] mk, logic srn, logic drn);
    // mk = {sof_n, sop_n, eop_n, eof_n}
    int act = 0;
    int which = -1;
    m_comb = 1'b0;
    for (int k = 0; k < 4; k++) if (!mk[3-k]) begin act++; which = k; end
    if (srn || drn) begin
      if (!m_err) n_idle[m_pos]++;
      if (srn) n_src_stall++;
      else     n_dst_stall++;
      if (act != 0) n_ignored++;
      return;
    end
    if (act > 1) begin
      m_comb = 1'b1;
      if (!m_err) n_comb_fault++;
      m_err = 1'b1;
    end else if (act == 0) begin
      if (m_pos == 0) begin
        if (!m_err) n_seq_fault++;
        m_err = 1'b1;
      end else if (!m_err) n_data[m_pos]++;
    end else if (!m_err) begin
      if (which == m_pos) begin
        n_mark[which]++;
        m_pos = (m_pos + 1) % 4;
      end else begin
        n_seq_fault++;
        m_err = 1'b1;
      end
    end
  endtask

  function automatic state_e model_state();
    return m_err ? ST_SERR : state_e'(3'(m_pos));
  endfunction

  // One clock cycle: drive, predict, clock, compare.
  task automatic cycle(logic [3:0] mk, logic srn, logic drn);
    {sof_n, sop_n, eop_n, eof_n} = mk;
    src_rdy_n = srn;
    dst_rdy_n = drn;
    // comb_error is registered: a new input must not reach it before the edge.
    #1;
    checks++;
    if (comb_error !== m_comb) begin
      failures++;
      $display("FAIL t=%0t comb_error=%0b changed before the clock edge", $time, comb_error);
    end
    model_step(mk, srn, drn);
    @(posedge clock);
    #1;
    checks++;
    if (error !== m_err || comb_error !== m_comb || state !== model_state()) begin
      failures++;
      $display("FAIL t=%0t ctrl=%04b src=%0b dst=%0b: error=%0b comb=%0b state=%s, expected %0b %0b %s",
               $time, mk, srn, drn, error, comb_error, state.name(), m_err, m_comb, model_state().name());
    end
  endtask

  task automatic do_reset();
    reset = 1'b1;
    {sof_n, sop_n, eop_n, eof_n, src_rdy_n, dst_rdy_n} = '1;
    @(posedge clock);
    #1 reset = 1'b0;
    m_pos = 0;
    m_err = 1'b0;
    m_comb = 1'b0;
    checks++;
    if (error !== 1'b0 || comb_error !== 1'b0 || state !== ST_S0) begin
      failures++;
      $display("FAIL checker not clean after reset");
    end
  endtask

  // Send one beat, with random throttling before it is transferred.
  task automatic send_beat(logic [3:0] mk);
    logic srn, drn;
    forever begin
      srn = ($urandom_range(0, 3) == 0);
      drn = ($urandom_range(0, 4) == 0);
      if (!srn && !drn) break;
      // Not transferred: markers hold the beat or carry anything.
      cycle(($urandom_range(0, 1) == 0) ? mk : 4'($urandom), srn, drn);
    end
    cycle(mk, 1'b0, 1'b0);
  endtask

  localparam logic [3:0] MK_SOF  = 4'b0111;
  localparam logic [3:0] MK_SOP  = 4'b1011;
  localparam logic [3:0] MK_EOP  = 4'b1101;
  localparam logic [3:0] MK_EOF  = 4'b1110;
  localparam logic [3:0] MK_DATA = 4'b1111;

  typedef enum int {F_NONE, F_COMB, F_NO_SOP, F_DATA_OUTSIDE, F_SECOND_SOF} fault_e;

  task automatic send_frame(fault_e f);
    logic [3:0] beats [$];
    int pick, bit_a, bit_b;
    beats.push_back(MK_SOF);
    repeat ($urandom_range(0, 2)) beats.push_back(MK_DATA);
    beats.push_back((f == F_NO_SOP) ? MK_DATA : MK_SOP);
    repeat ($urandom_range(0, 5)) beats.push_back(MK_DATA);
    beats.push_back(MK_EOP);
    repeat ($urandom_range(0, 2)) beats.push_back(MK_DATA);
    beats.push_back(MK_EOF);
    if (f == F_COMB) begin
      pick = $urandom_range(0, beats.size() - 1);
      // Clear two different marker bits, whatever the beat had already.
      bit_a = $urandom_range(0, 3);
      bit_b = (bit_a + $urandom_range(1, 3)) % 4;
      beats[pick][bit_a] = 1'b0;
      beats[pick][bit_b] = 1'b0;
    end
    if (f == F_SECOND_SOF) beats.insert($urandom_range(1, beats.size() - 1), MK_SOF);
    if (f == F_DATA_OUTSIDE) beats.push_back(MK_DATA);
    foreach (beats[i]) send_beat(beats[i]);
    // Idle gap between frames.
    repeat ($urandom_range(0, 2)) cycle(4'($urandom), 1'b1, $urandom_range(0, 1) == 1);
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    state_e fig_states [8] = '{ST_S1, ST_S2, ST_S2, ST_S2, ST_S2, ST_S3, ST_S3, ST_S0};
    logic [3:0] fig_beats [8] = '{MK_SOF, MK_SOP, MK_DATA, MK_DATA, MK_DATA, MK_EOP, MK_DATA, MK_EOF};
    fault_e f;

    do_reset();
    // Example frame of the timing diagram: back-to-back beats, no throttling.
    cycle(MK_DATA, 1'b1, 1'b0);
    for (int i = 0; i < 8; i++) begin
      cycle(fig_beats[i], 1'b0, 1'b0);
      checks++;
      if (state !== fig_states[i] || error !== 1'b0) begin
        failures++;
        $display("FAIL example frame beat %0d: state=%s error=%0b", i, state.name(), error);
      end
    end
    cycle(MK_DATA, 1'b1, 1'b0);

    // Random traffic with occasional faults.
    for (int fr = 0; fr < NUM_FRAMES; fr++) begin
      f = F_NONE;
      if ($urandom_range(0, 9) == 0) f = fault_e'($urandom_range(1, 4));
      send_frame(f);
      if (m_err) begin
        checks++;
        if (error !== 1'b1) begin
          failures++;
          $display("FAIL injected fault %s not reported", f.name());
        end
        do_reset();
        n_recover++;
      end else if (f != F_NONE) begin
        failures++;
        checks++;
        $display("FAIL model saw no violation for fault %s", f.name());
      end
    end

    need("idle in S0", n_idle[0]);
    need("idle in S1", n_idle[1]);
    need("idle in S2", n_idle[2]);
    need("idle in S3", n_idle[3]);
    need("data in S1", n_data[1]);
    need("data in S2", n_data[2]);
    need("data in S3", n_data[3]);
    need("SOF S0->S1", n_mark[0]);
    need("SOP S1->S2", n_mark[1]);
    need("EOP S2->S3", n_mark[2]);
    need("EOF S3->S0", n_mark[3]);
    need("source throttling", n_src_stall);
    need("destination throttling", n_dst_stall);
    need("markers ignored without transfer", n_ignored);
    need("forbidden combination detected", n_comb_fault);
    need("sequence violation detected", n_seq_fault);
    need("recovery by reset", n_recover);
    $display("frames=%0d SOF=%0d EOF=%0d comb faults=%0d sequence faults=%0d resets=%0d",
             NUM_FRAMES, n_mark[0], n_mark[3], n_comb_fault, n_seq_fault, n_recover);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
