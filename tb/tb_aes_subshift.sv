// tb_aes_subshift: self-checking test of the SubBytes+ShiftRows row
// instruction: the key-expansion example SubWord(RotWord(09cf4f3c)) =
// 8a84eb01, and random rows for all rotations in both directions against a
// byte rotation and S-box table built here (brute-force inverse + affine).
module tb_aes_subshift;
  logic [31:0] row, y;
  logic [1:0]  rot;
  logic        inv;
  logic [7:0]  sref [256];
  logic [7:0]  siref [256];
  int checks = 0, failures = 0;

  aes_subshift dut (.row(row), .rot(rot), .inv(inv), .y(y));

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

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: row %h rot %0d inv %b got %h expected %h", what, row, rot, inv, got, exp);
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
      siref[sref[v]] = 8'(v);
    end
    row = 32'h09cf4f3c; rot = 2'd1; inv = 1'b0; #1;
    chk("RotWord+SubWord", y, 32'h8a84eb01);
    for (int t = 0; t < 500; t++) begin
      logic [7:0] b [4];
      logic [31:0] e;
      row = $urandom; rot = 2'($urandom); inv = 1'($urandom); #1;
      for (int i = 0; i < 4; i++) b[i] = row[31 - 8*((i + rot) % 4) -: 8];
      for (int i = 0; i < 4; i++) e[31 - 8*i -: 8] = inv ? siref[b[i]] : sref[b[i]];
      chk("random", y, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
