// sdes: Simplified DES encryption of one 8-bit block under a 10-bit key (combinational).
//
// S-DES is the pseudo-random function f of the Molnar-Wagner mutual authentication between
// RFID reader and tag. The block is permuted (IP) and split into 4-bit halves L0, R0; two
// Feistel rounds give L1 = R0, R1 = L0 ^ f(R0, K1) and L2 = R1, R2 = L1 ^ f(R1, K2); the output
// is the inverse initial permutation of {L2, R2}. The subkeys come from sdes_keygen, f from
// sdes_f. The two-round structure without a swap before the final permutation, the key scheme
// and the S-boxes follow the design; the permutation tables are the classic S-DES ones, since
// the design does not list its own. Only encryption is provided, which is all the
// authentication protocol uses. The path is purely combinational: dout follows din and key.
module sdes
  import sdes_pkg::*;
(
  input  logic [9:0] key,
  input  logic [7:0] din,
  output logic [7:0] dout
);

  logic [7:0] k1, k2;
  logic [7:0] ip;
  logic [3:0] l0, r0, l1, r1, l2, r2, f1, f2;
  logic [7:0] pre;

  sdes_keygen u_key (.key(key), .k1(k1), .k2(k2));

  always_comb begin
    for (int i = 0; i < 8; i++) ip[7 - i] = din[8 - IP[i]];
  end
  assign l0 = ip[7:4];
  assign r0 = ip[3:0];

  sdes_f u_f1 (.r(r0), .k(k1), .f(f1));
  assign l1 = r0;
  assign r1 = l0 ^ f1;

  sdes_f u_f2 (.r(r1), .k(k2), .f(f2));
  assign l2 = r1;
  assign r2 = l1 ^ f2;

  assign pre = {l2, r2};
  always_comb begin
    for (int i = 0; i < 8; i++) dout[7 - i] = pre[8 - IPI[i]];
  end

endmodule
