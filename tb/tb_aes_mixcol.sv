// tb_aes_mixcol: self-checking test of the MixColumns / InvMixColumns
// column instruction: published column vectors in both directions, and
// random columns against the standard matrices {02 03 01 01} and
// {0e 0b 0d 09} evaluated with a bit-serial GF(2^8) multiply written here.
module tb_aes_mixcol;
  logic [31:0] col, y;
  logic        inv;
  int checks = 0, failures = 0;

  aes_mixcol dut (.col(col), .inv(inv), .y(y));

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11B << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [31:0] ref_mix(logic [31:0] c, logic [7:0] m0, logic [7:0] m1,
                                          logic [7:0] m2, logic [7:0] m3);
    logic [7:0] s [4];
    logic [7:0] m [4];
    logic [31:0] o;
    s = '{c[31:24], c[23:16], c[15:8], c[7:0]};
    m = '{m0, m1, m2, m3};
    for (int i = 0; i < 4; i++)
      o[31 - 8*i -: 8] = mul(s[i], m[0]) ^ mul(s[(i+1)%4], m[1])
                       ^ mul(s[(i+2)%4], m[2]) ^ mul(s[(i+3)%4], m[3]);
    return o;
  endfunction

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: col %h inv %b got %h expected %h", what, col, inv, got, exp);
    end
  endtask

  task automatic both(logic [31:0] a, logic [31:0] b);
    col = a; inv = 1'b0; #1; chk("fwd vector", y, b);
    col = b; inv = 1'b1; #1; chk("inv vector", y, a);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    both(32'hdb135345, 32'h8e4da1bc);
    both(32'hf20a225c, 32'h9fdc589d);
    both(32'h01010101, 32'h01010101);
    both(32'hc6c6c6c6, 32'hc6c6c6c6);
    both(32'hd4d4d4d5, 32'hd5d5d7d6);
    both(32'h2d26314c, 32'h4d7ebdf8);
    for (int t = 0; t < 1000; t++) begin
      col = $urandom;
      inv = 1'b0; #1; chk("fwd random", y, ref_mix(col, 8'h02, 8'h03, 8'h01, 8'h01));
      inv = 1'b1; #1; chk("inv random", y, ref_mix(col, 8'h0e, 8'h0b, 8'h0d, 8'h09));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
