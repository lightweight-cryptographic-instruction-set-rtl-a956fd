// tb_des_f: self-checking test of the DES F function instruction.
// Uses the first two rounds of the classic worked example
// (key 133457799BBCDFF1, plaintext 0123456789ABCDEF), checks that the
// that f depends on every subkey bit.
module tb_des_f;
  logic [31:0] r, f;
  logic [47:0] k;
  int checks = 0, failures = 0;

  des_f dut (.r(r), .k(k), .f(f));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
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
    logic [31:0] base;
    r = 32'hF0AAF0AA; k = 48'h1B02EFFC7072; #1;
    chk("round 1", f, 32'h234AA9BB);
    r = 32'hEF4A6544; k = 48'h79AED9DBC9E5; #1;
    chk("round 2", f, 32'h3CAB87A3);
    // every single subkey bit must change the result
    r = 32'h12345678; k = 48'h0; #1;
    base = f;
    for (int b = 0; b < 48; b++) begin
      k = 48'h1 << b; #1;
      checks++;
      if (f == base) begin
        failures++;
        $display("FAIL key bit %0d has no effect", b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
