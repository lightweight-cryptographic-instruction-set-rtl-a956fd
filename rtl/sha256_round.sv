// sha256_round: one SHA-256 compression round, as one instruction.
//
//   T1 = h + S1(e) + Ch(e,f,g) + K_t + W_t     T2 = S0(a) + Maj(a,b,c)
//   (a,b,c,d,e,f,g,h) <- (T1+T2, a, b, c, d+T1, e, f, g)
// with S0 = ROTR2^ROTR13^ROTR22 and S1 = ROTR6^ROTR11^ROTR25 (FIPS 180-4).
// All arithmetic is modulo 2^32. Combinational; the working variables live
// in the special registers of sha256_unit. Six of the eight output words
// (b, c, d, f, g, h) are the inputs moved down by one place: pure wiring.
module sha256_round
  import crypto_pkg::*;
(
  input  sha_state_t  st_in,
  input  logic [31:0] k,
  input  logic [31:0] w,
  output sha_state_t  st_out
);

  logic [31:0] s0, s1, ch, maj, t1, t2;

  always_comb begin
    s1  = rotr32(st_in.e, 6) ^ rotr32(st_in.e, 11) ^ rotr32(st_in.e, 25);
    s0  = rotr32(st_in.a, 2) ^ rotr32(st_in.a, 13) ^ rotr32(st_in.a, 22);
    ch  = (st_in.e & st_in.f) ^ (~st_in.e & st_in.g);
    maj = (st_in.a & st_in.b) ^ (st_in.a & st_in.c) ^ (st_in.b & st_in.c);
    t1  = st_in.h + s1 + ch + k + w;
    t2  = s0 + maj;
    st_out.a = t1 + t2;
    st_out.b = st_in.a;
    st_out.c = st_in.b;
    st_out.d = st_in.c;
    st_out.e = st_in.d + t1;
    st_out.f = st_in.e;
    st_out.g = st_in.f;
    st_out.h = st_in.g;
  end

endmodule
