// sha256_unit: SHA-256 special registers with the round and schedule
// instructions.
//
// State: the working variables a..h (sha_state_t) and a sliding window of
// the sixteen most recent message-schedule words, win[0] oldest. With them
// in registers, the 64 rounds of one block run without moving a..h or W
// between the processor and memory. Operations, at most one per cycle, all
// taking effect at the next rising clock edge:
//   wr_state : a..h register idx <- din (load H before a block)
//   ld_w     : shift din into the window (16 times per block: M0..M15)
//   do_round : one compression round with K_t = din and W_t = win[0]
//   do_sched : shift the next schedule word into the window
// A block is: 8 x wr_state, 16 x ld_w, then 64 x (do_round, do_sched),
// then 8 reads of dout (combinational, register idx) for H += a..h in
// software. Giving K_t as an operand and doing the final addition in
// software are this design's choices. Synchronous active-low reset clears
// all registers.
module sha256_unit
  import crypto_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_state,
  input  logic        ld_w,
  input  logic        do_round,
  input  logic        do_sched,
  input  logic [2:0]  idx,
  input  logic [31:0] din,
  output logic [31:0] dout
);

  sha_state_t  st_q, st_rnd;
  logic [31:0] win_q [16];
  logic [31:0] w_new;
  logic [31:0] st_words [8];

  sha256_round u_round (.st_in(st_q), .k(din), .w(win_q[0]), .st_out(st_rnd));
  sha256_sched u_sched (.win(win_q), .w_new(w_new));

  assign st_words = '{st_q.a, st_q.b, st_q.c, st_q.d, st_q.e, st_q.f, st_q.g, st_q.h};
  assign dout = st_words[idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q <= '0;
      for (int i = 0; i < 16; i++) win_q[i] <= '0;
    end else begin
      if (do_round) st_q <= st_rnd;
      if (wr_state) begin
        unique case (idx)
          3'd0: st_q.a <= din;
          3'd1: st_q.b <= din;
          3'd2: st_q.c <= din;
          3'd3: st_q.d <= din;
          3'd4: st_q.e <= din;
          3'd5: st_q.f <= din;
          3'd6: st_q.g <= din;
          3'd7: st_q.h <= din;
          default: ;
        endcase
      end
      if (ld_w || do_sched) begin
        for (int i = 0; i < 15; i++) win_q[i] <= win_q[i+1];
        win_q[15] <= ld_w ? din : w_new;
      end
    end
  end

  // One special-register operation per cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({wr_state, ld_w, do_round, do_sched}))
    else $error("sha256_unit: more than one operation in a cycle");

endmodule
