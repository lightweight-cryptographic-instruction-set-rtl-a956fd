// des_f: the DES Feistel function as one instruction, f(R, K) = P(S(E(R) ^ K)).
//
// The expansion E and permutation P are the same rewirings as in des_perm
// (instantiated here so that the tables exist once in the source); the
// substitution uses the parallel S-box table des_sbox. The XOR with the
// left half and the swap of halves are left to software, so one call
// replaces the whole inner loop of a DES round. Combinational. The unused
// upper bits of the two 64-bit des_perm results are constant zero.
module des_f
  import crypto_pkg::*;
(
  input  logic [31:0] r,
  input  logic [47:0] k,
  output logic [31:0] f
);

  logic [63:0] e_w, p_w;
  logic [31:0] s_o;

  des_perm u_e (.sel(DP_E), .din({32'h0, r}),   .dout(e_w));
  des_sbox u_s (.din(e_w[47:0] ^ k),            .dout(s_o));
  des_perm u_p (.sel(DP_P), .din({32'h0, s_o}), .dout(p_w));

  assign f = p_w[31:0];

endmodule
