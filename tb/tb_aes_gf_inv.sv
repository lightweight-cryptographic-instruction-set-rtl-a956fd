// tb_aes_gf_inv: exhaustive test of the GF(2^8) inverter: x * inv(x) = 1
// for every non-zero x (bit-serial multiply written here) and inv(0) = 0.
module tb_aes_gf_inv;
  logic [7:0] x, y;
  int checks = 0, failures = 0;

  aes_gf_inv dut (.x(x), .y(y));

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11B << (i - 8);
    return p[7:0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      x = 8'(v); #1;
      checks++;
      if ((v == 0 && y != 8'h00) || (v != 0 && mul(x, y) != 8'h01)) begin
        failures++;
        $display("FAIL inv(%h) = %h", x, y);
      end
    end
    x = 8'h53; #1;
    checks++;
    if (y != 8'hCA) begin failures++; $display("FAIL inv(53) = %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
