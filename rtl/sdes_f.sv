// sdes_f: the S-DES round function f(R, K) (combinational).
//
// The 4-bit half R is expanded to 8 bits (EP), XORed with the 8-bit subkey K, the left four
// bits go through S-box S0 and the right four through S1 (row from the outer two bits,
// column from the inner two), and the two 2-bit results are permuted by P4 into the 4-bit
// output. The structure and the S-boxes follow the design; EP and P4 are the classic tables.
module sdes_f
  import sdes_pkg::*;
(
  input  logic [3:0] r,
  input  logic [7:0] k,
  output logic [3:0] f
);

  logic [7:0] e, x;
  logic [1:0] s0o, s1o;
  logic [3:0] s;

  always_comb begin
    for (int i = 0; i < 8; i++) e[7 - i] = r[4 - EP[i]];
    x   = e ^ k;
    s0o = S0[{x[7], x[4]}][{x[6], x[5]}];
    s1o = S1[{x[3], x[0]}][{x[2], x[1]}];
    s   = {s0o, s1o};
    for (int i = 0; i < 4; i++) f[3 - i] = s[4 - P4[i]];
  end

endmodule
