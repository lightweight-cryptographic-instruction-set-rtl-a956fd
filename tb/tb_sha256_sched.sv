// tb_sha256_sched: self-checking test of the message-schedule step:
// W16 and W17 of the published "abc" example and random windows against
// the reference of sha_ref_pkg.
module tb_sha256_sched;
  import sha_ref_pkg::*;

  logic [31:0] win [16];
  logic [31:0] w_new;
  int checks = 0, failures = 0;

  sha256_sched dut (.win(win), .w_new(w_new));

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
    for (int i = 0; i < 16; i++) win[i] = 32'h0;
    win[0] = 32'h61626380; win[15] = 32'h00000018; #1;
    chk("W16", w_new, 32'h61626380);
    for (int i = 0; i < 15; i++) win[i] = win[i+1];
    win[15] = 32'h61626380; #1;
    chk("W17", w_new, 32'h000F0000);
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 16; i++) win[i] = $urandom;
      #1;
      chk("random", w_new, ref_sched(win[14], win[9], win[1], win[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
