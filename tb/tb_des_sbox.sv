// tb_des_sbox: self-checking test of the parallel DES S-box table.
// Checks the worked-example substitution, that every row of every box is a
// permutation of 0..15, and corner entries of the published boxes.
module tb_des_sbox;
  logic [47:0] din;
  logic [31:0] dout;
  int checks = 0, failures = 0;

  des_sbox dut (.din(din), .dout(dout));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Look one 6-bit value up in box n (0 = S1) through the full-width table.
  task automatic look(int n, logic [5:0] v, output logic [3:0] o);
    din = 48'h0;
    din[47 - 6*n -: 6] = v;
    #1;
    o = dout[31 - 4*n -: 4];
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 48'h6117BA866527; #1;
    chk("example", dout, 32'h5C82B597);
    for (int n = 0; n < 8; n++)
      for (int row = 0; row < 4; row++) begin
        logic [15:0] seen;
        seen = '0;
        for (int col = 0; col < 16; col++) begin
          logic [5:0] v;
          logic [3:0] o;
          v = {row[1], col[3:0], row[0]};
          look(n, v, o);
          seen[o] = 1'b1;
        end
        chk($sformatf("S%0d row %0d permutation", n+1, row), {16'h0, seen}, 32'h0000FFFF);
      end
    // first and last entries of each box (row 0 col 0, row 3 col 15)
    begin
      int first[8] = '{14, 15, 10, 7, 2, 12, 4, 13};
      int last [8] = '{13,  9, 12, 14, 3, 13, 12, 11};
      for (int n = 0; n < 8; n++) begin
        logic [3:0] o;
        look(n, 6'b000000, o); chk("first", {28'h0, o}, first[n]);
        look(n, 6'b111111, o); chk("last",  {28'h0, o}, last[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
