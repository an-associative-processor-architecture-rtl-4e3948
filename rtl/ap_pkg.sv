// ap_pkg - types shared by the associative processor data path.
//
// The data path is a SIMD, bit-serial, word-parallel array: every elementary
// processor (EP) receives the same memory addresses, the same opcode and the
// same broadcast data bit each cycle. This package defines the control word
// that reaches the ALU stage of every EP. The opcode set and its encoding are
// this design's own: the source architecture names the kinds of operation
// (additions, subtractions, comparisons, status loads and stores, election of
// the first active EP, extremum searches) but gives no instruction format.
package ap_pkg;

  // Operations executed by the ALU stage of every EP in the same cycle.
  // M = bit read from memory (input buffer), D = broadcast data bit,
  // R = operand latch, C = carry, S = status flag.
  typedef enum logic [4:0] {
    OP_NOP     = 5'd0,   // nothing
    OP_MOV     = 5'd1,   // OB = M
    OP_SETD    = 5'd2,   // OB = D
    OP_NOT     = 5'd3,   // OB = ~M
    OP_AND     = 5'd4,   // OB = M & R
    OP_OR      = 5'd5,   // OB = M | R
    OP_XOR     = 5'd6,   // OB = M ^ R
    OP_STS     = 5'd7,   // OB = S (status stored to memory by the write stage)
    OP_LATCH   = 5'd8,   // R  = M (first operand of a memory-memory operation)
    OP_ADDD    = 5'd9,   // {C,OB} = M + D + cin      (X + A)
    OP_SUBD    = 5'd10,  // {C,OB} = M + ~D + cin     (A - X, cin=1 on the LSB)
    OP_RSUBD   = 5'd11,  // {C,OB} = ~M + D + cin     (X - A, cin=1 on the LSB)
    OP_ADDR    = 5'd12,  // {C,OB} = M + R + cin      (B + A)
    OP_SUBR    = 5'd13,  // {C,OB} = M + ~R + cin     (B - A)
    OP_RSUBR   = 5'd14,  // {C,OB} = ~M + R + cin     (A - B)
    OP_S_SETD  = 5'd16,  // S = D
    OP_S_LDM   = 5'd17,  // S = M (status retrieved from memory)
    OP_S_MATCH = 5'd18,  // S = S & (M == D)
    OP_S_ORM   = 5'd19,  // S = S | M
    OP_S_CARRY = 5'd20,  // S = C ^ D  (D=1: S = borrow of the last subtraction)
    OP_S_ANDC  = 5'd21,  // S = S & (C ^ D)
    OP_S_NOT   = 5'd22,  // S = ~S
    OP_S_FIRST = 5'd23,  // S = 1 only in the first active EP (token election)
    OP_S_EXTR  = 5'd24   // extremum step: T = S & (M == D); S = (any T) ? T : S
  } ep_op_e;

  // Carry-in selection for the arithmetic operations.
  typedef enum logic [1:0] {
    CIN_KEEP = 2'd0,     // use the carry left by the previous bit
    CIN_ZERO = 2'd1,     // first bit of an addition
    CIN_ONE  = 2'd2      // first bit of a subtraction (two's complement)
  } cin_e;

  // Control word of the ALU stage, broadcast to all EPs.
  typedef struct packed {
    ep_op_e op;
    logic   cond;        // 1: only EPs whose status is set execute
    cin_e   cin;
    logic   d;           // broadcast data bit
  } ep_ctl_t;

  localparam ep_ctl_t CTL_NOP = '{op: OP_NOP, cond: 1'b0, cin: CIN_KEEP, d: 1'b0};

  // True when the operation loads the output buffer (and so may be written).
  function automatic logic op_writes_ob(ep_op_e op);
    return (op inside {OP_MOV, OP_SETD, OP_NOT, OP_AND, OP_OR, OP_XOR, OP_STS,
                       OP_ADDD, OP_SUBD, OP_RSUBD, OP_ADDR, OP_SUBR, OP_RSUBR});
  endfunction

endpackage
