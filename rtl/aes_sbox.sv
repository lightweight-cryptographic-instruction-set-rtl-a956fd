// aes_sbox: one byte of SubBytes (inv=0) or InvSubBytes (inv=1).
//
// Forward: y = A(x^-1) with the affine map A(b)_i = b_i ^ b_(i+4) ^ b_(i+5)
// ^ b_(i+6) ^ b_(i+7) ^ c_i, c = 0x63 (indices mod 8). Inverse:
// y = (A^-1(x))^-1 with A^-1(b)_i = b_(i+2) ^ b_(i+5) ^ b_(i+7) ^ d_i,
// d = 0x05. One GF(2^8) inverter is shared; multiplexers put the inverse
// affine map before it or the affine map after it. Combinational.
module aes_sbox (
  input  logic [7:0] x,
  input  logic       inv,
  output logic [7:0] y
);

  logic [7:0] pre, inv_in, inv_out, post;

  always_comb begin
    for (int i = 0; i < 8; i++)
      pre[i] = x[(i+2)%8] ^ x[(i+5)%8] ^ x[(i+7)%8];
    pre ^= 8'h05;
    for (int i = 0; i < 8; i++)
      post[i] = inv_out[i] ^ inv_out[(i+4)%8] ^ inv_out[(i+5)%8]
              ^ inv_out[(i+6)%8] ^ inv_out[(i+7)%8];
    post ^= 8'h63;
  end

  assign inv_in = inv ? pre : x;

  aes_gf_inv u_inv (.x(inv_in), .y(inv_out));

  assign y = inv ? inv_out : post;

endmodule
