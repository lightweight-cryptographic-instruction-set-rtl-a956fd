// tb_crypto_ise: end-to-end test of the instruction-set extension.
// The testbench plays the processor: it issues the custom instructions one
// per cycle, in the order the C software would, and keeps in its own
// variables only what software keeps in general registers (key schedules,
// the AES state as four column words, the DES halves, H0..H7).
//   AES-128/192/256 encryption and decryption of the FIPS-197 appendix C
//   vectors; DES encryption of two published vectors and decryption back;
//   3DES (EDE) with one key (equals DES), with three keys (published vector)
//   and round trips; SHA-256 of "abc" and of the 56-byte two-block message.
// It checks the one-cycle issue-to-result latency on every instruction,
// counts how often each opcode and each AES mode/rotation was used (a count
// of zero is a failure) and prints the cycles per block.
module tb_crypto_ise;
  import crypto_pkg::*;
  import sha_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        issue = 1'b0;
  ise_op_e     op = OP_DES_IP;
  logic [2:0]  imm = '0;
  logic [63:0] rs = '0;
  logic [47:0] rt = '0;
  logic [63:0] rd;
  logic        rd_valid;

  int checks = 0, failures = 0;
  int op_count [NUM_OPS];
  int mix_dir [2];
  int ss_mode [8];
  longint unsigned cycle = 0;

  crypto_ise dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Issue one instruction; the result is taken one clock later.
  task automatic ex(ise_op_e o, logic [2:0] i, logic [63:0] a, logic [47:0] b,
                    output logic [63:0] r);
    issue = 1'b1; op = o; imm = i; rs = a; rt = b;
    @(posedge clk);
    #1;
    op_count[int'(o)]++;
    if (o == OP_AES_MIX) mix_dir[i[0]]++;
    if (o == OP_AES_SUBSH) ss_mode[i]++;
    if (!rd_valid) begin
      checks++; failures++;
      $display("FAIL rd_valid low one cycle after issue of %s", o.name());
    end
    r = rd;
    issue = 1'b0;
  endtask

  // ---------------------------------------------------------------- AES
  logic [31:0] rk [60];

  task automatic aes_expand(logic [255:0] key, int nk);
    logic [63:0] r;
    logic [7:0]  rcon;
    int nr;
    nr = nk + 6;
    rcon = 8'h01;
    for (int i = 0; i < nk; i++) rk[i] = key[255 - 32*i -: 32];
    for (int i = nk; i < 4 * (nr + 1); i++) begin
      logic [31:0] t;
      t = rk[i-1];
      if (i % nk == 0) begin
        ex(OP_AES_SUBSH, 3'b001, {32'h0, t}, '0, r);   // SubWord(RotWord)
        t = r[31:0] ^ {rcon, 24'h0};
        rcon = (rcon[7]) ? ((rcon << 1) ^ 8'h1b) : (rcon << 1);
      end else if (nk > 6 && i % nk == 4) begin
        ex(OP_AES_SUBSH, 3'b000, {32'h0, t}, '0, r);   // SubWord
        t = r[31:0];
      end
      rk[i] = rk[i-nk] ^ t;
    end
  endtask

  // rows <-> columns, then SubBytes+ShiftRows on each row
  task automatic aes_subshift_state(ref logic [31:0] c [4], input logic inv);
    logic [63:0] r;
    logic [31:0] row;
    for (int ri = 0; ri < 4; ri++) begin
      logic [1:0] rot;
      rot = inv ? 2'((4 - ri) % 4) : 2'(ri);
      row = {c[0][31 - 8*ri -: 8], c[1][31 - 8*ri -: 8], c[2][31 - 8*ri -: 8], c[3][31 - 8*ri -: 8]};
      ex(OP_AES_SUBSH, {inv, rot}, {32'h0, row}, '0, r);
      for (int j = 0; j < 4; j++) c[j][31 - 8*ri -: 8] = r[31 - 8*j -: 8];
    end
  endtask

  task automatic aes_mix_state(ref logic [31:0] c [4], input logic inv);
    logic [63:0] r;
    for (int j = 0; j < 4; j++) begin
      ex(OP_AES_MIX, {2'b00, inv}, {32'h0, c[j]}, '0, r);
      c[j] = r[31:0];
    end
  endtask

  task automatic aes_block(logic [127:0] in, int nk, logic dec, output logic [127:0] out);
    logic [31:0] c [4];
    int nr;
    nr = nk + 6;
    for (int j = 0; j < 4; j++) c[j] = in[127 - 32*j -: 32];
    if (!dec) begin
      for (int j = 0; j < 4; j++) c[j] ^= rk[j];
      for (int rnd = 1; rnd <= nr; rnd++) begin
        aes_subshift_state(c, 1'b0);
        if (rnd != nr) aes_mix_state(c, 1'b0);
        for (int j = 0; j < 4; j++) c[j] ^= rk[4*rnd + j];
      end
    end else begin
      for (int j = 0; j < 4; j++) c[j] ^= rk[4*nr + j];
      for (int rnd = nr - 1; rnd >= 0; rnd--) begin
        aes_subshift_state(c, 1'b1);
        for (int j = 0; j < 4; j++) c[j] ^= rk[4*rnd + j];
        if (rnd != 0) aes_mix_state(c, 1'b1);
      end
    end
    out = {c[0], c[1], c[2], c[3]};
  endtask

  task automatic aes_test(logic [255:0] key, int nk, logic [127:0] pt, logic [127:0] ct);
    logic [127:0] o;
    longint unsigned c0;
    aes_expand(key, nk);
    c0 = cycle;
    aes_block(pt, nk, 1'b0, o);
    $display("AES-%0d encryption: %0d extension cycles per block", 32*nk, cycle - c0);
    chk($sformatf("AES-%0d encrypt", 32*nk), o, ct);
    aes_block(ct, nk, 1'b1, o);
    chk($sformatf("AES-%0d decrypt", 32*nk), o, pt);
  endtask

  // ---------------------------------------------------------------- DES
  logic [47:0] dk [16];
  localparam int SHIFTS [16] = '{1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1};

  // Subkeys in the order they are used: forward with left shifts for
  // encryption, backward with right shifts for decryption.
  task automatic des_keys(logic [63:0] key, logic dec);
    logic [63:0] cd, r;
    ex(OP_DES_PC1, 3'h0, key, '0, cd);
    if (!dec) begin
      for (int i = 0; i < 16; i++) begin
        ex(SHIFTS[i] == 1 ? OP_DES_ROL1 : OP_DES_ROL2, 3'h0, cd, '0, cd);
        ex(OP_DES_PC2, 3'h0, cd, '0, r);
        dk[i] = r[47:0];
      end
    end else begin
      // C16 D16 = C0 D0 (28 positions in total)
      for (int i = 0; i < 16; i++) begin
        ex(OP_DES_PC2, 3'h0, cd, '0, r);
        dk[i] = r[47:0];
        ex(SHIFTS[15 - i] == 1 ? OP_DES_ROR1 : OP_DES_ROR2, 3'h0, cd, '0, cd);
      end
    end
  endtask

  task automatic des_block(logic [63:0] in, output logic [63:0] out);
    logic [63:0] b, f;
    logic [31:0] l, rr, t;
    ex(OP_DES_IP, 3'h0, in, '0, b);
    l = b[63:32]; rr = b[31:0];
    for (int i = 0; i < 16; i++) begin
      ex(OP_DES_F, 3'h0, {32'h0, rr}, dk[i], f);
      t = l ^ f[31:0];
      l = rr; rr = t;
    end
    ex(OP_DES_SWAP, 3'h0, {l, rr}, '0, b);
    ex(OP_DES_FP, 3'h0, b, '0, out);
  endtask

  task automatic des(logic [63:0] key, logic dec, logic [63:0] in, output logic [63:0] out);
    des_keys(key, dec);
    des_block(in, out);
  endtask

  task automatic tdes(logic [63:0] k1, logic [63:0] k2, logic [63:0] k3, logic dec,
                      logic [63:0] in, output logic [63:0] out);
    logic [63:0] a, b;
    if (!dec) begin
      des(k1, 1'b0, in, a); des(k2, 1'b1, a, b); des(k3, 1'b0, b, out);
    end else begin
      des(k3, 1'b1, in, a); des(k2, 1'b0, a, b); des(k1, 1'b1, b, out);
    end
  endtask

  // ---------------------------------------------------------------- SHA
  task automatic sha_test(byte unsigned msg [], logic [255:0] exp);
    logic [31:0] w [32];
    logic [31:0] h [8];
    logic [63:0] r;
    int nb;
    longint unsigned c0;
    nb = pad(msg, w);
    for (int i = 0; i < 8; i++) h[i] = h_init(i);
    for (int b = 0; b < nb; b++) begin
      c0 = cycle;
      for (int i = 0; i < 8; i++) ex(OP_SHA_WRS, 3'(i), {32'h0, h[i]}, '0, r);
      for (int i = 0; i < 16; i++) ex(OP_SHA_LDW, 3'h0, {32'h0, w[16*b + i]}, '0, r);
      for (int t = 0; t < 64; t++) begin
        ex(OP_SHA_ROUND, 3'h0, {32'h0, k_const(t)}, '0, r);
        ex(OP_SHA_SCHED, 3'h0, '0, '0, r);
      end
      for (int i = 0; i < 8; i++) begin
        ex(OP_SHA_RDS, 3'(i), '0, '0, r);
        h[i] += r[31:0];
      end
      checks++;
      if (cycle - c0 != 8 + 16 + 128 + 8) begin
        failures++;
        $display("FAIL SHA-256 block took %0d cycles", cycle - c0);
      end
    end
    chk("SHA-256 digest", {h[0], h[1], h[2], h[3]}, exp[255:128]);
    chk("SHA-256 digest", {h[4], h[5], h[6], h[7]}, exp[127:0]);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] o, o2;
    longint unsigned c0;
    byte unsigned m [];
    string s;
    for (int i = 0; i < NUM_OPS; i++) op_count[i] = 0;
    mix_dir = '{0, 0};
    for (int i = 0; i < 8; i++) ss_mode[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    chk("rd_valid idle", {127'h0, rd_valid}, 128'h0);

    // AES, FIPS-197 appendix C
    aes_test({128'h000102030405060708090a0b0c0d0e0f, 128'h0}, 4,
             128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    aes_test({192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0}, 6,
             128'h00112233445566778899aabbccddeeff, 128'hdda97ca4864cdfe06eaf70a0ec0d7191);
    aes_test(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 8,
             128'h00112233445566778899aabbccddeeff, 128'h8ea2b7ca516745bfeafc49904b496089);
    // FIPS-197 appendix A.1 key expansion: last round key of AES-128
    aes_expand({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, 4);
    chk("AES-128 w[43]", {96'h0, rk[43]}, {96'h0, 32'hb6630ca6});

    // DES
    c0 = cycle;
    des(64'h133457799BBCDFF1, 1'b0, 64'h0123456789ABCDEF, o);
    $display("DES: %0d extension cycles for key schedule + one block", cycle - c0);
    chk("DES encrypt 1", {64'h0, o}, {64'h0, 64'h85E813540F0AB405});
    des(64'h133457799BBCDFF1, 1'b1, o, o2);
    chk("DES decrypt 1", {64'h0, o2}, {64'h0, 64'h0123456789ABCDEF});
    des(64'h0E329232EA6D0D73, 1'b0, 64'h8787878787878787, o);
    chk("DES encrypt 2", {64'h0, o}, {64'h0, 64'h0});
    des(64'h0E329232EA6D0D73, 1'b1, 64'h0, o2);
    chk("DES decrypt 2", {64'h0, o2}, {64'h0, 64'h8787878787878787});

    // 3DES (EDE)
    tdes(64'h133457799BBCDFF1, 64'h133457799BBCDFF1, 64'h133457799BBCDFF1, 1'b0,
         64'h0123456789ABCDEF, o);
    chk("3DES one key = DES", {64'h0, o}, {64'h0, 64'h85E813540F0AB405});
    c0 = cycle;
    tdes(64'h0123456789ABCDEF, 64'h23456789ABCDEF01, 64'h456789ABCDEF0123, 1'b0,
         64'h5468652071756663, o);
    $display("3DES: %0d extension cycles for key schedules + one block", cycle - c0);
    chk("3DES three keys", {64'h0, o}, {64'h0, 64'hA826FD8CE53B855F});
    tdes(64'h0123456789ABCDEF, 64'h23456789ABCDEF01, 64'h456789ABCDEF0123, 1'b1, o, o2);
    chk("3DES decrypt", {64'h0, o2}, {64'h0, 64'h5468652071756663});
    for (int t = 0; t < 3; t++) begin
      logic [63:0] k1, k2, k3, p;
      k1 = {$urandom, $urandom}; k2 = {$urandom, $urandom}; k3 = {$urandom, $urandom};
      p = {$urandom, $urandom};
      tdes(k1, k2, k3, 1'b0, p, o);
      tdes(k1, k2, k3, 1'b1, o, o2);
      chk("3DES round trip", {64'h0, o2}, {64'h0, p});
    end

    // E and P as stand-alone permutations (worked-example values)
    ex(OP_DES_E, 3'h0, 64'h00000000F0AAF0AA, '0, o);
    chk("DES E", {64'h0, o}, {64'h0, 64'h00007A15557A1555});
    ex(OP_DES_P, 3'h0, 64'h000000005C82B597, '0, o);
    chk("DES P", {64'h0, o}, {64'h0, 64'h00000000234AA9BB});

    // SHA-256
    m = new[3];
    m = '{8'h61, 8'h62, 8'h63};
    sha_test(m, 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad);
    s = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";
    m = new[s.len()];
    for (int i = 0; i < s.len(); i++) m[i] = s[i];
    sha_test(m, 256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1);

    // the result register keeps its value when nothing is issued
    @(posedge clk); #1;
    chk("rd_valid after idle", {127'h0, rd_valid}, 128'h0);

    // every mechanism exercised
    for (int i = 0; i < NUM_OPS; i++) begin
      checks++;
      if (op_count[i] == 0) begin
        failures++;
        $display("FAIL opcode %s never issued", ise_op_e'(i));
      end
    end
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (mix_dir[i] == 0) begin failures++; $display("FAIL MixColumns inv=%0d never used", i); end
    end
    // forward rotations 0..3 and inverse rotations 0..3
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (ss_mode[i] == 0) begin failures++; $display("FAIL SubShift mode %0d never used", i); end
    end
    for (int i = 0; i < NUM_OPS; i++)
      $display("  %-14s issued %0d times", ise_op_e'(i), op_count[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
