// e_8bit: Euclidean distance, in RSSI space, between one reference tag and the target tag.
//
// E = sqrt( sum over readers n of (Q_n - S_n)^2 ), where Q_n is the RSSI reader n measured for
// the reference tag and S_n the RSSI it measured for the target. The unit follows the
// structure of the design: one subtractor per reader (8-bit result), one squarer per reader
// (16-bit result), an adder of the four squares (18-bit result) and a square root (10-bit E).
// The subtractors produce |Q_n - S_n|, so 8 bits hold every difference; squaring makes the
// sign irrelevant. The id byte of the reference tag is passed along so that later stages know
// which tag a distance belongs to; the id byte of the target reading is not used.
//
// Interface: tag and target are 40-bit readings {id, r1, r2, r3, r4} (landmarc_pkg::tag_rec_t);
// o_tag is the 18-bit record {id, E}. Timing: two register stages, the subtractors and the
// square root, as in the design's RTL where both of them are clocked. in_valid is carried
// along with the data to give out_valid two clocks later; the valid pair is this design's
// addition. Reset is synchronous and active high.
module e_8bit
  import landmarc_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              in_valid,
  input  logic [TAG_W-1:0]  tag,
  input  logic [TAG_W-1:0]  target,
  output logic              out_valid,
  output logic [DIST_W-1:0] o_tag
);

  tag_rec_t ref_rec, tgt_rec;
  assign ref_rec = tag_rec_t'(tag);
  assign tgt_rec = tag_rec_t'(target);

  // Stage 1: absolute differences, registered.
  logic [N_READERS-1:0][RSSI_W-1:0] diff_q;
  logic [ID_W-1:0]                  id_q, id_q2;
  logic                             v_q, v_q2;

  always_ff @(posedge clk) begin
    if (reset) begin
      diff_q <= '0;
      id_q   <= '0;
      v_q    <= 1'b0;
    end else begin
      for (int n = 0; n < N_READERS; n++) begin
        diff_q[n] <= (ref_rec.rssi[n] >= tgt_rec.rssi[n]) ? ref_rec.rssi[n] - tgt_rec.rssi[n]
                                                          : tgt_rec.rssi[n] - ref_rec.rssi[n];
      end
      id_q <= ref_rec.id;
      v_q  <= in_valid;
    end
  end

  // Squares and their sum, combinational.
  logic [SUM_W-1:0] sum_sq;
  logic [N_READERS-1:0][2*RSSI_W-1:0] sq;
  always_comb begin
    sum_sq = '0;
    for (int n = 0; n < N_READERS; n++) begin
      sq[n]  = diff_q[n] * diff_q[n];
      sum_sq = sum_sq + SUM_W'(sq[n]);
    end
  end

  // Stage 2: square root, registered inside sqrt_18bit.
  logic [E_W-1:0] e_val;
  sqrt_18bit #(.IN_W(SUM_W), .OUT_W(E_W)) sqrt0 (
    .clk   (clk),
    .reset (reset),
    .i     (sum_sq),
    .q     (e_val)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      id_q2 <= '0;
      v_q2  <= 1'b0;
    end else begin
      id_q2 <= id_q;
      v_q2  <= v_q;
    end
  end

  dist_rec_t out_rec;
  assign out_rec.id = id_q2;
  assign out_rec.e  = e_val;
  assign o_tag      = out_rec;
  assign out_valid  = v_q2;

endmodule
