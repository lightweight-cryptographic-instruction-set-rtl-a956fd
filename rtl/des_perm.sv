// des_perm: the eleven DES/3DES bit-permutation instructions.
//
// Every function here is pure rewiring: one output bit is one input bit.
// Operands and results are right-aligned in a 64-bit word; bit numbering
// inside each field follows the DES standard (bit 1 = most significant).
//   IP, IP^-1, SWAP : 64 -> 64      PC-1 : 64 -> 56     PC-2 : 56 -> 48
//   ROL1/2, ROR1/2  : 56 -> 56 (C and D halves rotated on their own)
//   E : 32 -> 48                    P    : 32 -> 32
// The initial/final permutations, the permuted choices and the left circular
// shift follow the published extension; the right shifts (used to walk the
// key schedule backwards for decryption), E, P and SWAP complete the set of
// eleven and are this design's choice. The tables are those of the DES
// standard. Purely combinational, no clock.
module des_perm
  import crypto_pkg::*;
(
  input  des_perm_e   sel,
  input  logic [63:0] din,
  output logic [63:0] dout
);

  localparam int IP_T [64] = '{
    58, 50, 42, 34, 26, 18, 10, 2, 60, 52, 44, 36, 28, 20, 12, 4,
    62, 54, 46, 38, 30, 22, 14, 6, 64, 56, 48, 40, 32, 24, 16, 8,
    57, 49, 41, 33, 25, 17,  9, 1, 59, 51, 43, 35, 27, 19, 11, 3,
    61, 53, 45, 37, 29, 21, 13, 5, 63, 55, 47, 39, 31, 23, 15, 7};

  localparam int FP_T [64] = '{
    40, 8, 48, 16, 56, 24, 64, 32, 39, 7, 47, 15, 55, 23, 63, 31,
    38, 6, 46, 14, 54, 22, 62, 30, 37, 5, 45, 13, 53, 21, 61, 29,
    36, 4, 44, 12, 52, 20, 60, 28, 35, 3, 43, 11, 51, 19, 59, 27,
    34, 2, 42, 10, 50, 18, 58, 26, 33, 1, 41,  9, 49, 17, 57, 25};

  localparam int PC1_T [56] = '{
    57, 49, 41, 33, 25, 17,  9,  1, 58, 50, 42, 34, 26, 18,
    10,  2, 59, 51, 43, 35, 27, 19, 11,  3, 60, 52, 44, 36,
    63, 55, 47, 39, 31, 23, 15,  7, 62, 54, 46, 38, 30, 22,
    14,  6, 61, 53, 45, 37, 29, 21, 13,  5, 28, 20, 12,  4};

  localparam int PC2_T [48] = '{
    14, 17, 11, 24,  1,  5,  3, 28, 15,  6, 21, 10,
    23, 19, 12,  4, 26,  8, 16,  7, 27, 20, 13,  2,
    41, 52, 31, 37, 47, 55, 30, 40, 51, 45, 33, 48,
    44, 49, 39, 56, 34, 53, 46, 42, 50, 36, 29, 32};

  localparam int E_T [48] = '{
    32,  1,  2,  3,  4,  5,  4,  5,  6,  7,  8,  9,
     8,  9, 10, 11, 12, 13, 12, 13, 14, 15, 16, 17,
    16, 17, 18, 19, 20, 21, 20, 21, 22, 23, 24, 25,
    24, 25, 26, 27, 28, 29, 28, 29, 30, 31, 32,  1};

  localparam int P_T [32] = '{
    16,  7, 20, 21, 29, 12, 28, 17,  1, 15, 23, 26,  5, 18, 31, 10,
     2,  8, 24, 14, 32, 27,  3,  9, 19, 13, 30,  6, 22, 11,  4, 25};

  logic [63:0] ip_o, fp_o;
  logic [55:0] pc1_o;
  logic [47:0] pc2_o, e_o;
  logic [31:0] p_o;
  logic [27:0] c, d;

  // Output bit i (counted from the MSB) takes input bit T[i] (1 = MSB).
  always_comb begin
    for (int i = 0; i < 64; i++) ip_o[63-i]  = din[64 - IP_T[i]];
    for (int i = 0; i < 64; i++) fp_o[63-i]  = din[64 - FP_T[i]];
    for (int i = 0; i < 56; i++) pc1_o[55-i] = din[64 - PC1_T[i]];
    for (int i = 0; i < 48; i++) pc2_o[47-i] = din[56 - PC2_T[i]];
    for (int i = 0; i < 48; i++) e_o[47-i]   = din[32 - E_T[i]];
    for (int i = 0; i < 32; i++) p_o[31-i]   = din[32 - P_T[i]];
  end

  assign c = din[55:28];
  assign d = din[27:0];

  always_comb begin
    unique case (sel)
      DP_IP:   dout = ip_o;
      DP_FP:   dout = fp_o;
      DP_PC1:  dout = {8'h00, pc1_o};
      DP_PC2:  dout = {16'h0000, pc2_o};
      DP_ROL1: dout = {8'h00, c[26:0], c[27],    d[26:0], d[27]};
      DP_ROL2: dout = {8'h00, c[25:0], c[27:26], d[25:0], d[27:26]};
      DP_ROR1: dout = {8'h00, c[0],    c[27:1],  d[0],    d[27:1]};
      DP_ROR2: dout = {8'h00, c[1:0],  c[27:2],  d[1:0],  d[27:2]};
      DP_E:    dout = {16'h0000, e_o};
      DP_P:    dout = {32'h0, p_o};
      DP_SWAP: dout = {din[31:0], din[63:32]};
      default: dout = '0;
    endcase
  end

endmodule
