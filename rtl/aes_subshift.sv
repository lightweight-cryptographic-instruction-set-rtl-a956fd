// aes_subshift: SubBytes + ShiftRows instruction on a 32-bit row or key word.
//
// The word (byte 0 in bits 31:24) is rotated left by rot bytes, which is the
// ShiftRows of row rot (or, with rot = (4-r) mod 4, the InvShiftRows of row
// r, or RotWord in the key schedule with rot = 1), and every byte then goes
// through an S-box, forward or inverse by inv. Rotation and byte-wise
// substitution commute, so the same instruction serves encryption,
// decryption and key expansion. Combinational.
module aes_subshift (
  input  logic [31:0] row,
  input  logic [1:0]  rot,
  input  logic        inv,
  output logic [31:0] y
);

  logic [31:0] r;

  always_comb begin
    unique case (rot)
      2'd0: r = row;
      2'd1: r = {row[23:0], row[31:24]};
      2'd2: r = {row[15:0], row[31:16]};
      2'd3: r = {row[7:0],  row[31:8]};
      default: r = row;
    endcase
  end

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox u_sbox (.x(r[8*i +: 8]), .inv(inv), .y(y[8*i +: 8]));
  end

endmodule
