// aes_mixcol: MixColumns / InvMixColumns instruction on one 32-bit column.
//
// The column holds s0 in bits 31:24 down to s3 in bits 7:0. Four
// aes_mixcol_elem instances compute the forward matrix (02 03 01 01,
// circulant). For decryption the column is first multiplied by the circulant
// matrix (05 00 04 00): s0 ^= 4*(s0^s2), s2 ^= 4*(s0^s2), s1 ^= 4*(s1^s3),
// s3 ^= 4*(s1^s3); the forward matrix times that matrix is the inverse
// matrix (0e 0b 0d 09). The two 8-bit terms 4*(..) are ANDed with the
// inverse select (16 AND gates), so one multiplier serves both directions.
// Combinational.
module aes_mixcol
  import crypto_pkg::*;
(
  input  logic [31:0] col,
  input  logic        inv,
  output logic [31:0] y
);

  logic [7:0] s [4];
  logic [7:0] t [4];
  logic [7:0] u, v;

  assign u = xtime(xtime(col[31:24] ^ col[15:8])) & {8{inv}};
  assign v = xtime(xtime(col[23:16] ^ col[7:0]))  & {8{inv}};

  assign t[0] = col[31:24] ^ u;
  assign t[1] = col[23:16] ^ v;
  assign t[2] = col[15:8]  ^ u;
  assign t[3] = col[7:0]   ^ v;

  for (genvar i = 0; i < 4; i++) begin : g_elem
    aes_mixcol_elem u_elem (
      .a0(t[i]), .a1(t[(i+1)%4]), .a2(t[(i+2)%4]), .a3(t[(i+3)%4]), .y(s[i])
    );
  end

  assign y = {s[0], s[1], s[2], s[3]};

endmodule
