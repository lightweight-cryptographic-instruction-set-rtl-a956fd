// tb_des_perm: self-checking test of the eleven DES permutations.
// Checks published worked-example values (IP, PC-1, shifts, PC-2, E, P),
// inverse pairs (IP/IP^-1, ROL/ROR), PC-1's independence from the parity
// bits, and E and the rotations against formulas written here.
module tb_des_perm;
  import crypto_pkg::*;

  des_perm_e   sel;
  logic [63:0] din, dout;
  int checks = 0, failures = 0;

  des_perm dut (.sel(sel), .din(din), .dout(dout));

  logic [63:0] r1, r2;

  task automatic ap(des_perm_e s, logic [63:0] x, output logic [63:0] o);
    sel = s; din = x;
    #1;
    o = dout;
  endtask

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [27:0] rol28(logic [27:0] x, int n);
    return (x << n) | (x >> (28 - n));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] x, y;
    // worked example (key 133457799BBCDFF1, plaintext 0123456789ABCDEF)
    ap(DP_IP,   64'h0123456789ABCDEF, r1); chk("IP",    r1, 64'hCC00CCFFF0AAF0AA);
    ap(DP_PC1,  64'h133457799BBCDFF1, r1); chk("PC1",   r1, 64'h00F0CCAAF556678F);
    ap(DP_ROL1, 64'h00F0CCAAF556678F, r1); chk("ROL1",  r1, 64'h00E19955FAACCF1E);
    ap(DP_PC2,  64'h00E19955FAACCF1E, r1); chk("PC2a",  r1, 64'h00001B02EFFC7072);
    ap(DP_ROL1, 64'h00E19955FAACCF1E, r1); chk("ROL1b", r1, 64'h00C332ABF5599E3D);
    ap(DP_PC2,  64'h00C332ABF5599E3D, r1); chk("PC2b",  r1, 64'h000079AED9DBC9E5);
    ap(DP_E,    64'h00000000F0AAF0AA, r1); chk("E",     r1, 64'h00007A15557A1555);
    ap(DP_P,    64'h000000005C82B597, r1); chk("P",     r1, 64'h00000000234AA9BB);
    ap(DP_SWAP, 64'h0123456789ABCDEF, r1); chk("SWAP",  r1, 64'h89ABCDEF01234567);
    ap(DP_FP,   64'hCC00CCFFF0AAF0AA, r1); chk("FP",    r1, 64'h0123456789ABCDEF);
    for (int t = 0; t < 200; t++) begin
      x = {$urandom, $urandom};
      ap(DP_IP, x, r1); ap(DP_FP, r1, r2); chk("FP(IP)", r2, x);
      ap(DP_FP, x, r1); ap(DP_IP, r1, r2); chk("IP(FP)", r2, x);
      ap(DP_PC1, x ^ 64'h0101010101010101, r1); ap(DP_PC1, x, r2); chk("PC1 parity", r1, r2);
      y = {8'h0, x[55:0]};
      ap(DP_ROL1, y, r1); chk("ROL1", r1, {8'h0, rol28(y[55:28], 1), rol28(y[27:0], 1)});
      ap(DP_ROL2, y, r1); chk("ROL2", r1, {8'h0, rol28(y[55:28], 2), rol28(y[27:0], 2)});
      ap(DP_ROL1, y, r1); ap(DP_ROR1, r1, r2); chk("ROR1", r2, y);
      ap(DP_ROL2, y, r1); ap(DP_ROR2, r1, r2); chk("ROR2", r2, y);
      begin
        logic [47:0] e;
        logic [31:0] r;
        r = x[31:0];
        // group n (from 0) = input bits 4n .. 4n+5 (1-based, cyclic, 0 = 32)
        for (int n = 0; n < 8; n++)
          for (int j = 0; j < 6; j++) begin
            int pos;
            pos = ((4*n + j - 1 + 32) % 32) + 1;
            e[47 - 6*n - j] = r[32 - pos];
          end
        ap(DP_E, {32'h0, r}, r1); chk("E formula", r1, {16'h0, e});
      end
    end
    // P is a bijection: the images of the 32 single-bit inputs cover all bits
    begin
      logic [31:0] acc;
      acc = '0;
      for (int b = 0; b < 32; b++) begin
        ap(DP_P, 64'(32'h1 << b), r1);
        acc |= r1[31:0];
      end
      chk("P bijective", {32'h0, acc}, 64'h00000000FFFFFFFF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
