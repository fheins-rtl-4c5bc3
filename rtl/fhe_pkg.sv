// fhe_pkg: shared types and constants of the FHE in-storage accelerator.
//
// Every datapath in the design works on residues of one RNS limb: W-bit
// words below a prime modulus q.  A "row" is LANES such words, the width
// a functional unit consumes per cycle; a "superrow" is NUM_MODU rows, the
// width of the scratchpad read port that feeds all MODUs at once.
// The 128-lane width and the 4 NTT / 4 BCONV / 8 MODU mix per accelerator
// come from the document; the 36-bit word and the instruction encoding
// used by the accelerator sequencer are this design's own choices.
package fhe_pkg;

  parameter int unsigned W        = 36;   // residue word width (assumed)
  parameter int unsigned LANES    = 128;  // words per row (document: 128 lanes)
  parameter int unsigned NUM_NTT  = 4;    // NTT engines per accelerator
  parameter int unsigned NUM_BCONV= 4;    // BCONV engines per accelerator
  parameter int unsigned NUM_MODU = 8;    // MODUs per accelerator
  parameter int unsigned MAX_LOGN = 16;   // largest ring dimension 2^16

  typedef logic [W-1:0]   word_t;
  typedef logic [W:0]     mu_t;           // Barrett constant floor(2^(2W)/q)
  typedef word_t [LANES-1:0] row_t;

  // Modulus description: q, its Barrett constant and one extra constant
  // (scalar operand, psi, qhat, ... depending on the user).
  typedef struct packed {
    word_t q;
    mu_t   mu;
    word_t c;
  } const_t;

  typedef enum logic [1:0] {
    MOP_ADD = 2'd0,
    MOP_SUB = 2'd1,
    MOP_MUL = 2'd2
  } modu_op_e;

  typedef enum logic [1:0] {
    NTT_FWD  = 2'd0,   // negacyclic forward NTT
    NTT_INV  = 2'd1,   // negacyclic inverse NTT (scaled by 1/N)
    NTT_AUTO = 2'd2    // coefficient automorphism X -> X^g
  } ntt_mode_e;

  // Sequencer opcodes (static schedule prepared offline by the host).
  typedef enum logic [3:0] {
    OP_END    = 4'd0,   // stop, raise done
    OP_RECV   = 4'd1,   // n rows from an input stream to scratch or key buffer at d
    OP_SEND   = 4'd2,   // n rows from scratch a to the output stream
    OP_NCFG   = 4'd3,   // configure NTT unit from constants cidx..cidx+2
    OP_NLOAD  = 4'd4,   // N/LANES rows from scratch a into NTT unit
    OP_NRUN   = 4'd5,   // start NTT unit in mode, galois element in b
    OP_NSTORE = 4'd6,   // N/LANES rows from NTT unit to scratch d
    OP_VOP    = 4'd7,   // n superrows: d = a (mop) B, B chosen by sel
    OP_BCONV  = 4'd8,   // base conversion of n limbs (stride b) from a to d
    OP_SYNC   = 4'd9    // wait until every NTT unit is idle
  } opcode_e;

  // Operand-B / stream selector.
  typedef enum logic [1:0] {
    SEL_SPAD  = 2'd0,   // VOP: B from scratch     RECV: data stream  -> scratch
    SEL_KEY   = 2'd1,   // VOP: B from key buffer  RECV: bcast stream -> key buffer
    SEL_PRNG  = 2'd2,   // VOP: B from KeyGen PRNG RECV: bcast stream -> scratch
    SEL_CONST = 2'd3    // VOP: B = constant c broadcast
  } sel_e;

  typedef struct packed {
    opcode_e    op;
    logic [2:0] unit;
    sel_e       sel;
    modu_op_e   mop;
    ntt_mode_e  nmode;
    logic [15:0] a;
    logic [15:0] b;
    logic [15:0] d;
    logic [15:0] n;
    logic [7:0]  cidx;
  } instr_t;

  function automatic logic [MAX_LOGN-1:0] bitrev(input logic [MAX_LOGN-1:0] x,
                                                  input logic [4:0] logn);
    logic [MAX_LOGN-1:0] r;
    for (int i = 0; i < MAX_LOGN; i++) r[i] = x[MAX_LOGN-1-i];
    return r >> (5'(MAX_LOGN) - logn);
  endfunction

  function automatic word_t mod_add(input word_t a, input word_t b, input word_t q);
    logic [W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s >= {1'b0, q}) ? word_t'(s - {1'b0, q}) : word_t'(s);
  endfunction

  function automatic word_t mod_sub(input word_t a, input word_t b, input word_t q);
    return (a >= b) ? word_t'(a - b) : word_t'(a + q - b);
  endfunction

endpackage
