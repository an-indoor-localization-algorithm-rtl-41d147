// w_16bit: weighted coefficients of the k nearest reference tags (combinational).
//
// W_j = (1 / E_j^2) / sum over the K nearest tags of (1 / E_i^2). The structure follows the
// design: a squarer per input (10-bit E to 20-bit E^2), a divider per input forming the
// reciprocal as a 20-bit integer, an adder forming the 22-bit sum of the reciprocals, and a
// divider per input normalising each reciprocal by that sum.
// Fixed-point choices of this design: the reciprocal is inv_j = floor((2^20 - 1) / E_j^2),
// and E_j = 0 (target on top of a reference tag) saturates to 2^20 - 1; the weight is
// W_j = floor(inv_j * 2^21 / sum), a fraction with 21 fractional bits, so 1.0 is 2^21 and the
// K weights add up to at most 1.0. If every reciprocal is 0 (all E_j above 1023) the weights
// are 0.
//
// Interface: i[j] is the distance record {id, E} (18 bits), o[j] the weight record {id, W}
// (30 bits); ids pass straight through. No clock: the design's RTL of this unit has none.
module w_16bit
  import landmarc_pkg::*;
#(
  parameter int unsigned K = K_NN
) (
  input  logic [K-1:0][DIST_W-1:0] i,
  output logic [K-1:0][WREC_W-1:0] o
);

  localparam logic [INV_W-1:0] ONE_NUM = '1;   // 2^20 - 1

  dist_rec_t [K-1:0]        d;
  logic [K-1:0][SQ_W-1:0]   sq;
  logic [K-1:0][INV_W-1:0]  inv;
  logic [TOT_W-1:0]         w_tot;
  w_rec_t [K-1:0]           r;

  assign d = i;

  always_comb begin
    w_tot = '0;
    for (int n = 0; n < K; n++) begin
      sq[n]  = d[n].e * d[n].e;
      inv[n] = (sq[n] == '0) ? ONE_NUM : ONE_NUM / sq[n];
      w_tot  = w_tot + TOT_W'(inv[n]);
    end
  end

  logic [K-1:0][INV_W+W_FRAC-1:0] num;
  logic [K-1:0][INV_W+W_FRAC-1:0] quo;

  always_comb begin
    for (int n = 0; n < K; n++) begin
      num[n]  = {inv[n], {W_FRAC{1'b0}}};
      quo[n]  = (w_tot == '0) ? '0 : num[n] / (INV_W+W_FRAC)'(w_tot);
      r[n].id = d[n].id;
      r[n].w  = W_W'(quo[n]);
    end
  end

  assign o = r;

endmodule
