// crypto_pkg: types, opcodes and small GF(2^8) / SHA-256 helper functions
// shared by the cryptographic instruction-set extension.
//
// The extension adds single-cycle custom instructions to a 32-bit
// configurable processor for DES/3DES, AES (128/192/256) and SHA-256.
// The opcode list below is this design's own encoding; the instruction
// groups (11 DES permutations + DES F function, AES MixColumns and
// SubBytes/ShiftRows, SHA-256 round and message schedule on special
// registers) follow the published extension.
package crypto_pkg;

  // DES permutation selector (the 11 bit-permutation instructions).
  typedef enum logic [3:0] {
    DP_IP   = 4'd0,   // initial permutation, 64 -> 64
    DP_FP   = 4'd1,   // inverse initial permutation, 64 -> 64
    DP_PC1  = 4'd2,   // permuted choice 1, 64 -> 56
    DP_PC2  = 4'd3,   // permuted choice 2, 56 -> 48
    DP_ROL1 = 4'd4,   // rotate C and D (28 bits each) left by 1
    DP_ROL2 = 4'd5,   // rotate C and D left by 2
    DP_ROR1 = 4'd6,   // rotate C and D right by 1 (decryption schedule)
    DP_ROR2 = 4'd7,   // rotate C and D right by 2
    DP_E    = 4'd8,   // expansion, 32 -> 48
    DP_P    = 4'd9,   // round permutation, 32 -> 32
    DP_SWAP = 4'd10   // exchange the 32-bit halves of a block
  } des_perm_e;

  // Custom instruction opcodes seen by the extension.
  typedef enum logic [4:0] {
    OP_DES_IP    = 5'd0,
    OP_DES_FP    = 5'd1,
    OP_DES_PC1   = 5'd2,
    OP_DES_PC2   = 5'd3,
    OP_DES_ROL1  = 5'd4,
    OP_DES_ROL2  = 5'd5,
    OP_DES_ROR1  = 5'd6,
    OP_DES_ROR2  = 5'd7,
    OP_DES_E     = 5'd8,
    OP_DES_P     = 5'd9,
    OP_DES_SWAP  = 5'd10,
    OP_DES_F     = 5'd11,  // rd = f(rs[31:0], rt)
    OP_AES_MIX   = 5'd12,  // rd = (Inv)MixColumns(rs[31:0]); imm[0] = inverse
    OP_AES_SUBSH = 5'd13,  // rd = (Inv)SubBytes(rotl8(rs[31:0], imm[1:0])); imm[2] = inverse
    OP_SHA_WRS   = 5'd14,  // state[imm[2:0]] <= rs[31:0]
    OP_SHA_RDS   = 5'd15,  // rd = state[imm[2:0]]
    OP_SHA_LDW   = 5'd16,  // push rs[31:0] into the schedule window
    OP_SHA_ROUND = 5'd17,  // one compression round, K_t = rs[31:0], W_t = window[0]
    OP_SHA_SCHED = 5'd18   // push the next schedule word into the window
  } ise_op_e;

  localparam int unsigned NUM_OPS = 19;

  // SHA-256 working variables a..h, a in the top word.
  typedef struct packed {
    logic [31:0] a, b, c, d, e, f, g, h;
  } sha_state_t;

  // Multiply by x in GF(2^8) modulo x^8+x^4+x^3+x+1: left shift and a
  // conditional XOR with 0x1b (three XOR gates).
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6], b[5], b[4], b[3] ^ b[7], b[2] ^ b[7], b[1], b[0] ^ b[7], b[7]};
  endfunction

  // General GF(2^8) multiplication (shift-and-add).
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ t;
      t = xtime(t);
    end
    return p;
  endfunction

  function automatic logic [31:0] rotr32(input logic [31:0] x, input int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

endpackage
