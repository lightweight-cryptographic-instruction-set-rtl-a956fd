// tb_aes_sbox: exhaustive test of the AES S-box and its inverse. The
// reference table is built here: inverse by brute-force search with a
// bit-serial multiply, then the affine map written as x ^ rotl1 ^ rotl2 ^
// rotl3 ^ rotl4 ^ 0x63. Also published entries and InvS(S(x)) = x.
module tb_aes_sbox;
  logic [7:0] x, y;
  logic       inv;
  logic [7:0] sref [256];
  int checks = 0, failures = 0;

  aes_sbox dut (.x(x), .inv(inv), .y(y));

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11B << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] rotl(logic [7:0] b, int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  task automatic chk(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: x %h got %h expected %h", what, x, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [7:0] iv;
      iv = 8'h00;
      for (int c = 1; c < 256; c++) if (mul(8'(v), 8'(c)) == 8'h01) iv = 8'(c);
      sref[v] = iv ^ rotl(iv, 1) ^ rotl(iv, 2) ^ rotl(iv, 3) ^ rotl(iv, 4) ^ 8'h63;
    end
    inv = 1'b0;
    x = 8'h00; #1; chk("S(00)", y, 8'h63);
    x = 8'h53; #1; chk("S(53)", y, 8'hED);
    x = 8'hFF; #1; chk("S(FF)", y, 8'h16);
    for (int v = 0; v < 256; v++) begin
      inv = 1'b0; x = 8'(v); #1;
      chk("S", y, sref[v]);
      inv = 1'b1; x = sref[v]; #1;
      chk("InvS", y, 8'(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
