// tb_aes_mixcol_elem: self-checking test of the one-element MixColumns
// multiplier against a reference built here from a bit-serial GF(2^8)
// multiplication (2*a0 + 3*a1 + a2 + a3), plus a published column value.
module tb_aes_mixcol_elem;
  logic [7:0] a0, a1, a2, a3, y;
  int checks = 0, failures = 0;

  aes_mixcol_elem dut (.a0(a0), .a1(a1), .a2(a2), .a3(a3), .y(y));

  // reference multiply, written independently of the design's package
  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11B << (i - 8);
    return p[7:0];
  endfunction

  task automatic chk(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (a=%h %h %h %h)", what, got, exp, a0, a1, a2, a3);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a0 = 8'hdb; a1 = 8'h13; a2 = 8'h53; a3 = 8'h45; #1;
    chk("db134545", y, 8'h8e);
    for (int t = 0; t < 2000; t++) begin
      {a0, a1, a2, a3} = $urandom; #1;
      chk("random", y, mul(a0, 8'h02) ^ mul(a1, 8'h03) ^ a2 ^ a3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
