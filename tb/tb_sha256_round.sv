// tb_sha256_round: self-checking test of the SHA-256 round instruction:
// round 0 of the published "abc" example, then random states against the
// reference round of sha_ref_pkg (K_t computed from cube roots of primes).
module tb_sha256_round;
  import crypto_pkg::*;
  import sha_ref_pkg::*;

  sha_state_t  st_in, st_out;
  logic [31:0] k, w;
  int checks = 0, failures = 0;

  sha256_round dut (.st_in(st_in), .k(k), .w(w), .st_out(st_out));

  function automatic sha_state_t pack(words8_t s);
    return {s[0], s[1], s[2], s[3], s[4], s[5], s[6], s[7]};
  endfunction

  task automatic chk(string what, sha_state_t got, sha_state_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    words8_t s;
    for (int i = 0; i < 8; i++) s[i] = h_init(i);
    st_in = pack(s); k = k_const(0); w = 32'h61626380; #1;
    chk("abc round 0", st_out, {32'h5D6AEBCD, 32'h6A09E667, 32'hBB67AE85, 32'h3C6EF372,
                                32'hFA2A4622, 32'h510E527F, 32'h9B05688C, 32'h1F83D9AB});
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 8; i++) s[i] = $urandom;
      st_in = pack(s); k = k_const(t % 64); w = $urandom; #1;
      chk("random", st_out, pack(ref_round(s, k, w)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
