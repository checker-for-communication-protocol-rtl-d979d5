// llc_pkg: types and constants shared by the LocalLink protocol checker.
//
// The checker watches the six active-low control signals of one LocalLink
// interface. They are gathered here in one packed struct, ll_ctrl_t, so that
// the top, the symbol decoder and the testbenches pass them as one bundle.
// The package also encodes the parts of the checker's formal model:
//   - cmp_op_e : the comparison operators a condition may use
//                (==, <>, >, >=, <, <=), after the description language;
//   - sym_e    : the indices of the input symbols p0..p5 of the LocalLink
//                checker (start of frame, start of payload, end of payload,
//                end of frame, data beat, no transfer);
//   - state_e  : the states S0..S3 and the error state Serr of the
//                sequence automaton.
// The state encoding (binary, Serr last) is this design's own choice.
package llc_pkg;

  // Control signals of one LocalLink interface; all active low.
  typedef struct packed {
    logic sof_n;      // start of frame
    logic sop_n;      // start of payload (end of header)
    logic eop_n;      // end of payload (start of footer)
    logic eof_n;      // end of frame
    logic src_rdy_n;  // source has a valid beat
    logic dst_rdy_n;  // destination accepts the beat
  } ll_ctrl_t;

  // Comparison operator of one condition Sig Oper Int.
  typedef enum logic [2:0] {
    OP_EQ = 3'd0,  // ==
    OP_NE = 3'd1,  // <>
    OP_GT = 3'd2,  // >
    OP_GE = 3'd3,  // >=
    OP_LT = 3'd4,  // <
    OP_LE = 3'd5   // <=
  } cmp_op_e;

  // Input symbols of the LocalLink checker.
  localparam int unsigned NUM_SYM = 6;
  typedef enum int unsigned {
    SYM_SOF  = 0,  // p0: first beat of a frame
    SYM_SOP  = 1,  // p1: first beat of the payload
    SYM_EOP  = 2,  // p2: last beat of the payload
    SYM_EOF  = 3,  // p3: last beat of a frame
    SYM_DATA = 4,  // p4: ordinary data beat
    SYM_IDLE = 5   // p5: no beat transferred this cycle
  } sym_e;

  typedef logic [NUM_SYM-1:0] sym_vec_t;

  // States of the sequence automaton A = (Q, T, P, S0, Serr).
  typedef enum logic [2:0] {
    ST_S0   = 3'd0,  // between frames
    ST_S1   = 3'd1,  // in the header (after SOF)
    ST_S2   = 3'd2,  // in the payload (after SOP)
    ST_S3   = 3'd3,  // in the footer (after EOP)
    ST_SERR = 3'd4   // protocol violation seen; held until reset
  } state_e;

endpackage
