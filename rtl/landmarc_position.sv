// landmarc_position: target position as the weighted mean of the nearest reference tags.
//
// (x, y) = sum over the K nearest tags of W_i * (x_i, y_i). The reference tags stand on a
// square grid of GRID_COLS columns with spacing d, numbered row by row from 1 in the corner
// nearest the origin; tag 1 is at (d, d), one spacing in from both walls, as in the design's
// floor plan. The position of tag j is therefore x = 1 + (j-1) mod GRID_COLS and
// y = 1 + (j-1) div GRID_COLS, in units of d. Ids outside 1..N_REF have no position and add
// nothing. The unit is combinational. The weights are expected to add up to at most 1.0, as
// the weight unit guarantees; the 24-bit results then hold any point of the grid (x, y < 4d).
//
// Interface: w[i] is a weight record {id, W} with W a fraction of W_FRAC fractional bits;
// x and y are in units of d with the same W_FRAC fractional bits (x = 2^21 means x = d).
// The weighting equation and the floor plan follow the design; carrying it out in hardware,
// right after the weights, is this design's choice.
module landmarc_position
  import landmarc_pkg::*;
#(
  parameter int unsigned K    = K_NN,
  parameter int unsigned NREF = N_REF,
  parameter int unsigned COLS = GRID_COLS
) (
  input  logic [K-1:0][WREC_W-1:0] w,
  output logic [POS_W-1:0]         x,
  output logic [POS_W-1:0]         y
);

  w_rec_t [K-1:0] r;
  assign r = w;

  always_comb begin
    logic [ID_W-1:0]  idx;
    logic [POS_W-1:0] cx, cy;
    x = '0;
    y = '0;
    for (int n = 0; n < K; n++) begin
      idx = r[n].id - 1'b1;
      cx  = POS_W'(idx % ID_W'(COLS)) + 1'b1;
      cy  = POS_W'(idx / ID_W'(COLS)) + 1'b1;
      if (r[n].id >= 1 && r[n].id <= ID_W'(NREF)) begin
        x   = x + POS_W'(r[n].w) * cx;
        y   = y + POS_W'(r[n].w) * cy;
      end
    end
  end

endmodule
