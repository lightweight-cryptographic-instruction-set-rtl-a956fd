// sha256_sched: next SHA-256 message-schedule word from a 16-word window.
//
// win[0] is W_(t-16), win[15] is W_(t-1). The result is
//   W_t = s1(W_(t-2)) + W_(t-7) + s0(W_(t-15)) + W_(t-16)
// with s0 = ROTR7^ROTR18^SHR3 and s1 = ROTR17^ROTR19^SHR10 (FIPS 180-4),
// modulo 2^32. Combinational.
module sha256_sched
  import crypto_pkg::*;
(
  input  logic [31:0] win [16],
  output logic [31:0] w_new
);

  logic [31:0] sg0, sg1;

  always_comb begin
    sg0   = rotr32(win[1], 7)   ^ rotr32(win[1], 18)  ^ (win[1] >> 3);
    sg1   = rotr32(win[14], 17) ^ rotr32(win[14], 19) ^ (win[14] >> 10);
    w_new = sg1 + win[9] + sg0 + win[0];
  end

endmodule
