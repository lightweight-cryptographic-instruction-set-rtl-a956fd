// crypto_ise: cryptographic instruction-set extension for a 32-bit
// configurable processor (top level).
//
// The processor issues one custom instruction per cycle (issue, op, imm and
// the source operands rs, rt); the extension computes the result in the same
// cycle and registers it, so rd/rd_valid appear one clock after issue. The
// instructions are grouped by algorithm:
//   DES/3DES : eleven bit permutations (des_perm) and the whole F function
//              (des_f, with the S-boxes as a parallel hardware table);
//   AES      : MixColumns/InvMixColumns on a column (aes_mixcol) and
//              SubBytes+ShiftRows on a row or key word (aes_subshift),
//              both direction-selectable by imm;
//   SHA-256  : special registers a..h and a 16-word schedule window with a
//              full-round and a schedule-step instruction (sha256_unit).
// The key schedules, the AES state transposition and the Feistel XOR/swap
// stay in software. The instruction groups follow the published extension;
// the opcode encoding, operand packing and one-cycle result register are
// this design's choices. Synchronous active-low reset.
module crypto_ise
  import crypto_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        issue,
  input  ise_op_e     op,
  input  logic [2:0]  imm,
  input  logic [63:0] rs,
  input  logic [47:0] rt,
  output logic [63:0] rd,
  output logic        rd_valid
);

  logic [63:0] perm_o;
  logic [31:0] f_o, mix_o, ss_o, sha_o;
  logic [63:0] res;
  des_perm_e   perm_sel;

  // Opcodes 0..10 map one to one onto the permutation selector.
  assign perm_sel = des_perm_e'(op[3:0]);

  des_perm     u_perm (.sel(perm_sel), .din(rs), .dout(perm_o));
  des_f        u_f    (.r(rs[31:0]), .k(rt), .f(f_o));
  aes_mixcol   u_mix  (.col(rs[31:0]), .inv(imm[0]), .y(mix_o));
  aes_subshift u_ss   (.row(rs[31:0]), .rot(imm[1:0]), .inv(imm[2]), .y(ss_o));

  sha256_unit u_sha (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_state (issue && op == OP_SHA_WRS),
    .ld_w     (issue && op == OP_SHA_LDW),
    .do_round (issue && op == OP_SHA_ROUND),
    .do_sched (issue && op == OP_SHA_SCHED),
    .idx      (imm[2:0]),
    .din      (rs[31:0]),
    .dout     (sha_o)
  );

  always_comb begin
    unique case (op)
      OP_DES_IP, OP_DES_FP, OP_DES_PC1, OP_DES_PC2, OP_DES_ROL1, OP_DES_ROL2,
      OP_DES_ROR1, OP_DES_ROR2, OP_DES_E, OP_DES_P, OP_DES_SWAP:
                    res = perm_o;
      OP_DES_F:     res = {32'h0, f_o};
      OP_AES_MIX:   res = {32'h0, mix_o};
      OP_AES_SUBSH: res = {32'h0, ss_o};
      OP_SHA_RDS:   res = {32'h0, sha_o};
      default:      res = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd       <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= issue;
      if (issue) rd <= res;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   issue |-> (int'(op) < NUM_OPS))
    else $error("crypto_ise: illegal opcode %0d", op);

endmodule
