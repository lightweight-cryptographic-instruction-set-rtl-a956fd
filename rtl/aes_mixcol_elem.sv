// aes_mixcol_elem: MixColumns multiplier for one element of a state column.
//
// Computes y = {02}*a0 ^ {03}*a1 ^ a2 ^ a3 over GF(2^8). Since
// {03}*a1 = {02}*a1 ^ a1, the two doublings share one xtime block:
// y = xtime(a0 ^ a1) ^ a1 ^ a2 ^ a3, where xtime is the shift and
// three-XOR reduction by x^8+x^4+x^3+x+1. Four instances, fed with the
// column rotated by 0..3 bytes, form a whole column. Combinational.
module aes_mixcol_elem
  import crypto_pkg::*;
(
  input  logic [7:0] a0,
  input  logic [7:0] a1,
  input  logic [7:0] a2,
  input  logic [7:0] a3,
  output logic [7:0] y
);

  assign y = xtime(a0 ^ a1) ^ a1 ^ a2 ^ a3;

endmodule
