// sdes_keygen: S-DES key schedule, 10-bit key to two 8-bit subkeys (combinational).
//
// The key is permuted (PC1), split into 5-bit halves C0 and D0, each half rotated left by one
// to give C1 and D1, and PC2 selects eight of the ten bits of C1D1 as K1. C1 and D1 are then
// rotated left by two more places to give C2 and D2, and PC2 of C2D2 is K2. The structure and
// the rotation amounts follow the design's key scheme; the PC1/PC2 tables are the classic S-DES
// ones (see sdes_pkg).
module sdes_keygen
  import sdes_pkg::*;
(
  input  logic [9:0] key,
  output logic [7:0] k1,
  output logic [7:0] k2
);

  logic [9:0] p;
  logic [4:0] c0, d0, c1, d1, c2, d2;
  logic [9:0] cd1, cd2;

  always_comb begin
    for (int i = 0; i < 10; i++) p[9 - i] = key[10 - PC1[i]];
    c0  = p[9:5];
    d0  = p[4:0];
    c1  = {c0[3:0], c0[4]};
    d1  = {d0[3:0], d0[4]};
    c2  = {c1[2:0], c1[4:3]};
    d2  = {d1[2:0], d1[4:3]};
    cd1 = {c1, d1};
    cd2 = {c2, d2};
    for (int i = 0; i < 8; i++) begin
      k1[7 - i] = cd1[10 - PC2[i]];
      k2[7 - i] = cd2[10 - PC2[i]];
    end
  end

endmodule
