// aes_gf_inv: multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1.
//
// Uses x^-1 = x^254 (and 0 -> 0 falls out of the same formula), evaluated
// with the addition chain x^2, x^3, x^6, x^12, x^15, x^30, x^60, x^120,
// x^126, x^127, x^254: four general multiplications and seven squarings.
// Squaring is linear in GF(2^8), so it costs only XORs. This is a plain
// power-chain inverter, this design's own choice, not a composite-field
// one. Combinational.
module aes_gf_inv
  import crypto_pkg::*;
(
  input  logic [7:0] x,
  output logic [7:0] y
);

  logic [7:0] x2, x3, x6, x12, x15, x30, x60, x120, x126, x127;

  always_comb begin
    x2   = gf_mul(x, x);
    x3   = gf_mul(x2, x);
    x6   = gf_mul(x3, x3);
    x12  = gf_mul(x6, x6);
    x15  = gf_mul(x12, x3);
    x30  = gf_mul(x15, x15);
    x60  = gf_mul(x30, x30);
    x120 = gf_mul(x60, x60);
    x126 = gf_mul(x120, x6);
    x127 = gf_mul(x126, x);
    y    = gf_mul(x127, x127);
  end

endmodule
