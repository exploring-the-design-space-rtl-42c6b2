// ecc_pkg: word size, operand lengths, field constants and shared encodings for the two
// 16-bit multi-precision ECC field processors (prime field P-192 and binary field
// c2tnb191v1). A field element is stored in data memory as N (or M) little-endian words
// of W bits: word 0 holds bits 15..0. The word size W=16, the prime p = 2^192 - 2^64 - 1 and
// the polynomial f(z) = z^191 + z^9 + 1 follow the source design; the operation and
// MAC/ALU encodings are this implementation's own.
package ecc_pkg;

  // Processor word size and number of words per field element.
  localparam int unsigned W = 16;
  localparam int unsigned P_BITS = 192;              // n = ceil(log2 p)
  localparam int unsigned B_BITS = 191;              // m, degree of f(z)
  localparam int unsigned N = (P_BITS + W - 1) / W;  // words of an F_p element   (12)
  localparam int unsigned M = (B_BITS + W - 1) / W;  // words of an F_2^m element (12)

  // NIST P-192 prime.
  localparam logic [P_BITS-1:0] P192 =
      192'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFE_FFFFFFFF_FFFFFFFF;

  // c2tnb191v1: f(z) = z^B_BITS + z^B_K + 1.
  localparam int unsigned B_K = 9;

  // Field operation requested from a field engine.
  typedef enum logic [1:0] {
    FOP_ADD = 2'd0,
    FOP_SUB = 2'd1,
    FOP_MUL = 2'd2,
    FOP_SQR = 2'd3
  } fop_e;

  // Multiply-accumulate unit command.
  typedef enum logic [2:0] {
    MAC_NOP  = 3'd0,
    MAC_CLR  = 3'd1,  // acc <= 0
    MAC_MUL  = 3'd2,  // acc <= acc + a*b          (binary: acc ^ a*b)
    MAC_MUL2 = 3'd3,  // acc <= acc + 2*a*b        (integer unit only)
    MAC_ADD  = 3'd4,  // acc <= acc + a            (binary: acc ^ a)
    MAC_SHR  = 3'd5   // acc <= acc >> W           (hand the next column down)
  } mac_op_e;

  // CPU ALU operation.
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,  // {cout,y} = a + b + cin
    ALU_SUB = 3'd1,  // y = a - b - cin, cout = borrow
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4,
    ALU_SHL = 3'd5,  // {cout,y} = {a,cin}
    ALU_SHR = 3'd6   // {y,cout} = {cin,a}
  } alu_op_e;

  // Word i of the P-192 prime.
  function automatic logic [W-1:0] p192_word(input logic [5:0] i);
    return P192[i*W +: W];
  endfunction

endpackage
