// cu_pkg: shared types and constants of the phase-register control unit.
//
// A control unit built in this style is described by a list of product terms.
// Each term belongs to one phase state F_i, may require some of the sampled
// inputs x and internal variables v to have given values (the conditional-jump
// and wait instructions met since the start of the phase state), and drives
// one control input: the J or K input of an output flip-flop z_m, the J or K
// input of an internal flip-flop v_i, or a transition condition f_{i-j} into
// phase state j. Terms that drive the same control input are ORed, which
// gives the two-level (sum-of-products) control functions of the method.
//
// The term format, the maximum sizes below and the example flow chart are
// choices of this design. The example flow chart (EX_*) is a small handshake
// controller used as the default program and by the testbenches:
//   inputs  x0 = start, x1 = ack, x2 = mode
//   outputs z0 = req,   z1 = busy, z2 = done
//   internal v0 = repeat flag
//   F0: wait start=1;          busy set, done reset, -> F1
//   F1: req set; if mode: v0 set;                     -> F2
//   F2: wait ack=1;            req reset,             -> F3
//   F3: wait ack=0; if v0: v0 reset, -> F1  else      -> F4
//   F4: delay one phase state                         -> F5
//   F5: busy reset, done set,                         -> F0
// Its six phase states have the shift-register assignment in EX_CODES: every
// transition i->j satisfies CODE[j][2:1] == CODE[i][1:0], so only the lowest
// state bit needs an input function.
package cu_pkg;

  localparam int unsigned MAX_X   = 16;  // most inputs a term can test
  localparam int unsigned MAX_V   = 8;   // most internal variables a term can test
  localparam int unsigned IDX_W   = 5;   // phase / target index width (32 max)

  typedef enum logic [2:0] {
    ACT_NONE    = 3'd0,  // unused term
    ACT_SET_Z   = 3'd1,  // J input of output flip-flop z[idx]
    ACT_RESET_Z = 3'd2,  // K input of output flip-flop z[idx]
    ACT_SET_V   = 3'd3,  // J input of internal flip-flop v[idx]
    ACT_RESET_V = 3'd4,  // K input of internal flip-flop v[idx]
    ACT_GOTO    = 3'd5   // transition condition f_{phase-idx}
  } act_e;

  typedef struct packed {
    logic [IDX_W-1:0] phase;   // phase state F_i the term belongs to
    logic [MAX_X-1:0] x_care;  // inputs the term tests
    logic [MAX_X-1:0] x_val;   // required values of the tested inputs
    logic [MAX_V-1:0] v_care;  // internal variables the term tests
    logic [MAX_V-1:0] v_val;   // required values of the tested variables
    act_e             act;     // which control input the term drives
    logic [IDX_W-1:0] idx;     // z / v index or target phase state
  } term_t;

  function automatic term_t mk(logic [IDX_W-1:0] ph, logic [MAX_X-1:0] xc,
                               logic [MAX_X-1:0] xv, logic [MAX_V-1:0] vc,
                               logic [MAX_V-1:0] vv, act_e a, logic [IDX_W-1:0] i);
    term_t t;
    t.phase  = ph;
    t.x_care = xc;
    t.x_val  = xv;
    t.v_care = vc;
    t.v_val  = vv;
    t.act    = a;
    t.idx    = i;
    return t;
  endfunction

  // Example flow chart (see header).
  localparam int unsigned EX_NX = 3;
  localparam int unsigned EX_NZ = 3;
  localparam int unsigned EX_NV = 1;
  localparam int unsigned EX_NF = 6;
  localparam int unsigned EX_P  = 3;   // ceil(log2 6) state variables
  localparam int unsigned EX_NT = 15;

  localparam term_t [EX_NT-1:0] EX_TERMS = '{
    // index 14 down to 0 (packed array, element 0 is the last entry)
    mk(5, 0, 0, 0, 0, ACT_GOTO,    0),   // 14: F5 -> F0
    mk(5, 0, 0, 0, 0, ACT_SET_Z,   2),   // 13: F5: done set
    mk(5, 0, 0, 0, 0, ACT_RESET_Z, 1),   // 12: F5: busy reset
    mk(4, 0, 0, 0, 0, ACT_GOTO,    5),   // 11: F4 -> F5 (delay)
    mk(3, 2, 0, 1, 0, ACT_GOTO,    4),   // 10: F3, ack=0, v0=0 -> F4
    mk(3, 2, 0, 1, 1, ACT_GOTO,    1),   //  9: F3, ack=0, v0=1 -> F1
    mk(3, 2, 0, 1, 1, ACT_RESET_V, 0),   //  8: F3, ack=0, v0=1: v0 reset
    mk(2, 2, 2, 0, 0, ACT_GOTO,    3),   //  7: F2, ack=1 -> F3
    mk(2, 2, 2, 0, 0, ACT_RESET_Z, 0),   //  6: F2, ack=1: req reset
    mk(1, 0, 0, 0, 0, ACT_GOTO,    2),   //  5: F1 -> F2
    mk(1, 4, 4, 0, 0, ACT_SET_V,   0),   //  4: F1, mode=1: v0 set
    mk(1, 0, 0, 0, 0, ACT_SET_Z,   0),   //  3: F1: req set
    mk(0, 1, 1, 0, 0, ACT_GOTO,    1),   //  2: F0, start=1 -> F1
    mk(0, 1, 1, 0, 0, ACT_RESET_Z, 2),   //  1: F0, start=1: done reset
    mk(0, 1, 1, 0, 0, ACT_SET_Z,   1)    //  0: F0, start=1: busy set
  };

  // Shift-register phase-state assignment of the example (F5..F0).
  localparam logic [EX_NF-1:0][EX_P-1:0] EX_CODES = '{
    3'b100, 3'b010, 3'b101, 3'b110, 3'b011, 3'b001
  };

endpackage
