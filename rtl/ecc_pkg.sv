// ecc_pkg: sizes, instruction format and port commands shared by the
// GF(p) co-processor.
//
// K is the field size (160 bits, the ECC-160p case). The MALU processes
// L = K + ALPHA bits of the multiplier X, D bits per clock, so the
// Montgomery radix is R = 2^L. ALPHA = 4 leaves room for operands up to 4N
// and keeps L a multiple of D; the value of d and alpha are this design's
// choice. Operands and registers are L bits wide; the host moves them
// through an operand buffer of BUF_W = 8*ceil(L/8) bits, one byte at a time.
//
// Instruction word (32 bits, loaded LSB byte first):
//   [31:30] op    : NOP, MALU, CP
//   [29]    neg   : CP only, use the bit-wise complement of operand B
//   [28:27] xmod  : modifier of operand X (CP: A): none, times 2, halve mod N
//   [26:25] smod  : modifier of operand S (CP: C)
//   [24:20] rd    : destination register
//   [19:15] rx    : X (CP: A)
//   [14:10] ry    : Y (CP: B)
//   [9:5]   rs    : S (CP: C)
//   [4:0]   unused
// MALU computes rd = X*Y*2^-L + S mod N, CP computes rd = A + B' + C mod N
// with B' = ~B when neg is set, so CP(2N+1, t, 0) yields -t mod N.
package ecc_pkg;

  parameter int unsigned K      = 160;            // field size in bits
  parameter int unsigned D      = 4;              // multiplier bits per clock (d)
  parameter int unsigned ALPHA  = 4;              // extra columns of the array
  parameter int unsigned L      = K + ALPHA;      // columns / iterations, R = 2^L
  parameter int unsigned BUF_W  = ((L + 7) / 8) * 8;
  parameter int unsigned NREGS  = 32;             // co-processor RAM words
  parameter int unsigned RAW    = $clog2(NREGS);  // register address bits

  typedef enum logic [1:0] {
    OP_NOP  = 2'd0,
    OP_MALU = 2'd1,
    OP_CP   = 2'd2
  } opcode_e;

  typedef enum logic [1:0] {
    MOD_NONE = 2'd0,
    MOD_DBL  = 2'd1,   // 2*v
    MOD_HALF = 2'd2    // v/2 mod N
  } opmod_e;

  typedef struct packed {
    opcode_e        op;
    logic           neg;
    opmod_e         xmod;
    opmod_e         smod;
    logic [4:0]     rd;
    logic [4:0]     rx;
    logic [4:0]     ry;
    logic [4:0]     rs;
    logic [4:0]     unused;
  } instr_t;

  // Commands on port P2, strobed by P3.0; the byte argument is on P0.
  typedef enum logic [7:0] {
    CMD_BUF_IN  = 8'h01,   // shift a byte into the operand buffer (LSB byte first)
    CMD_BUF_OUT = 8'h02,   // drop the byte shown on P1, show the next one
    CMD_STORE   = 8'h03,   // RAM[P0] <= buffer
    CMD_LOAD    = 8'h04,   // buffer <= RAM[P0]
    CMD_SETN    = 8'h05,   // modulus register <= buffer
    CMD_IR_IN   = 8'h06,   // shift a byte into the instruction register
    CMD_EXEC    = 8'h07    // execute the instruction register
  } cmd_e;

  // Host requests from the port interface to the controller.
  typedef enum logic [2:0] {
    REQ_NONE  = 3'd0,
    REQ_STORE = 3'd1,
    REQ_LOAD  = 3'd2,
    REQ_SETN  = 3'd3,
    REQ_EXEC  = 3'd4
  } req_e;

endpackage
