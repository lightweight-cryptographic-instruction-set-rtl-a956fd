// tb_sha256_unit: hashes "abc" and the 56-byte two-block test message with
// the special-register unit, driving it as software would (load H, load
// 16 words, 64 x round+schedule, read a..h and add), and compares with the
// published digests. Each operation takes one clock; the test checks that
// a round's result is readable in the cycle after it is issued and counts
// the cycles of one block.
module tb_sha256_unit;
  import sha_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        wr_state = 0, ld_w = 0, do_round = 0, do_sched = 0;
  logic [2:0]  idx = '0;
  logic [31:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [31:0] kt [64];

  sha256_unit dut (.*);

  always #5 clk = ~clk;

  task automatic op(logic ws, logic lw, logic rn, logic sc, logic [2:0] i, logic [31:0] d);
    @(negedge clk);
    wr_state = ws; ld_w = lw; do_round = rn; do_sched = sc; idx = i; din = d;
    @(negedge clk);
    wr_state = 0; ld_w = 0; do_round = 0; do_sched = 0;
  endtask

  // back-to-back issue: one operation per cycle
  task automatic op1(logic ws, logic lw, logic rn, logic sc, logic [2:0] i, logic [31:0] d);
    wr_state = ws; ld_w = lw; do_round = rn; do_sched = sc; idx = i; din = d;
    @(negedge clk);
  endtask

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic hash(byte unsigned msg [], logic [31:0] exp [8]);
    logic [31:0] w [32];
    logic [31:0] h [8];
    int nb, c0, c1;
    nb = pad(msg, w);
    for (int i = 0; i < 8; i++) h[i] = h_init(i);
    for (int b = 0; b < nb; b++) begin
      @(negedge clk);
      c0 = $time / 10;
      for (int i = 0; i < 8; i++) op1(1, 0, 0, 0, 3'(i), h[i]);
      for (int i = 0; i < 16; i++) op1(0, 1, 0, 0, 3'd0, w[16*b + i]);
      for (int t = 0; t < 64; t++) begin
        op1(0, 0, 1, 0, 3'd0, kt[t]);
        op1(0, 0, 0, 1, 3'd0, 32'h0);
      end
      wr_state = 0; ld_w = 0; do_round = 0; do_sched = 0;
      c1 = $time / 10;
      checks++;
      if (c1 - c0 != 8 + 16 + 128) begin
        failures++;
        $display("FAIL block took %0d cycles", c1 - c0);
      end
      for (int i = 0; i < 8; i++) begin
        idx = 3'(i); #1;
        h[i] = h[i] + dout;
      end
    end
    for (int i = 0; i < 8; i++) chk($sformatf("digest word %0d", i), h[i], exp[i]);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned m1 [];
    byte unsigned m2 [];
    string s2;
    for (int t = 0; t < 64; t++) kt[t] = k_const(t);
    chk("K0",  kt[0],  32'h428a2f98);
    chk("K63", kt[63], 32'hc67178f2);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // single round latency: result visible one clock after issue
    op(1, 0, 0, 0, 3'd0, 32'h6a09e667);
    idx = 3'd0; #1; chk("write a", dout, 32'h6a09e667);
    op(0, 1, 0, 0, 3'd0, 32'h11111111);
    op(0, 0, 1, 0, 3'd0, 32'h0);
    idx = 3'd1; #1; chk("round moves a to b", dout, 32'h6a09e667);
    m1 = new[3];
    m1 = '{8'h61, 8'h62, 8'h63};
    hash(m1, '{32'hba7816bf, 32'h8f01cfea, 32'h414140de, 32'h5dae2223,
               32'hb00361a3, 32'h96177a9c, 32'hb410ff61, 32'hf20015ad});
    s2 = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";
    m2 = new[s2.len()];
    for (int i = 0; i < s2.len(); i++) m2[i] = s2[i];
    hash(m2, '{32'h248d6a61, 32'hd20638b8, 32'he5c02693, 32'h0c3e6039,
               32'ha33ce459, 32'h64ff2167, 32'hf6ecedd4, 32'h19db06c1});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
