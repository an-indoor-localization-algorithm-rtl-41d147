// landmarc: LANDMARC indoor localization engine (top level).
//
// Given the RSSI that each of four readers measured for a target tag and for nine reference
// tags at known places, it estimates where the target is. Nine Euclidean distance units
// (e_8bit) work in parallel, one per reference tag, each producing {id, E}; a bubble sort
// (sort_18bit) picks the three reference tags with the smallest E; the weight unit (w_16bit)
// turns their distances into weights W ~ 1/E^2 that add up to one; and landmarc_position forms
// the weighted mean of the three tags' grid positions. This chain follows the design; the
// control around it is this design's own.
//
// Interface: on start (one-clock pulse, accepted when busy is low) the readings ref_tag[0..8]
// and target are sampled. ref_tag[j] and target are 40-bit records {id, r1, r2, r3, r4}.
// When done pulses, nearest[] holds the three nearest distance records in ascending order of E,
// w_out[] their weight records {id, W} (W has 21 fractional bits) and pos_x/pos_y the estimate
// in units of the tag spacing d (21 fractional bits). Outputs hold until the next done.
// Timing: done is high 68 clocks after the edge that samples start (that edge also loads the
// first distance stage): 1 clock to finish the distances, 1 to load the sort, (N_REF-1)^2 = 64
// in the sort, 1 for the controller to see the sort finish and 1 for the output registers.
// The next start is accepted on the clock after done. Reset is synchronous
// and active high.
module landmarc
  import landmarc_pkg::*;
(
  input  logic                          clk,
  input  logic                          reset,
  input  logic                          start,
  input  logic [N_REF-1:0][TAG_W-1:0]   ref_tag,
  input  logic [TAG_W-1:0]              target,
  output logic                          busy,
  output logic                          done,
  output logic [K_NN-1:0][DIST_W-1:0]   nearest,
  output logic [K_NN-1:0][WREC_W-1:0]   w_out,
  output logic [POS_W-1:0]              pos_x,
  output logic [POS_W-1:0]              pos_y
);

  typedef enum logic [1:0] {S_IDLE, S_DIST, S_SORT, S_OUT} state_t;
  state_t state;

  // Distance units, one per reference tag.
  logic                            go;
  logic [N_REF-1:0]                e_valid;
  logic [N_REF-1:0][DIST_W-1:0]    e_rec;

  assign go = start && (state == S_IDLE);

  for (genvar g = 0; g < N_REF; g++) begin : g_euclid
    e_8bit u_e (
      .clk       (clk),
      .reset     (reset),
      .in_valid  (go),
      .tag       (ref_tag[g]),
      .target    (target),
      .out_valid (e_valid[g]),
      .o_tag     (e_rec[g])
    );
  end

  // k-nearest-neighbour selection.
  logic                           sort_start, sort_busy, sort_done;
  logic [K_NN-1:0][DIST_W-1:0]    knn;

  assign sort_start = (state == S_DIST) && e_valid[0];

  sort_18bit #(.N(N_REF), .K(K_NN)) u_sort (
    .clk    (clk),
    .reset  (reset),
    .start  (sort_start),
    .in_tag (e_rec),
    .busy   (sort_busy),
    .done   (sort_done),
    .o      (knn)
  );

  // Weights and position, combinational on the sort result.
  logic [K_NN-1:0][WREC_W-1:0] w_rec;
  logic [POS_W-1:0]            x_c, y_c;

  w_16bit #(.K(K_NN)) u_w (
    .i (knn),
    .o (w_rec)
  );

  landmarc_position #(.K(K_NN), .NREF(N_REF), .COLS(GRID_COLS)) u_pos (
    .w (w_rec),
    .x (x_c),
    .y (y_c)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state   <= S_IDLE;
      done    <= 1'b0;
      nearest <= '0;
      w_out   <= '0;
      pos_x   <= '0;
      pos_y   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (go)         state <= S_DIST;
        S_DIST: if (e_valid[0]) state <= S_SORT;
        S_SORT: if (sort_done)  state <= S_OUT;
        S_OUT: begin
          nearest <= knn;
          w_out   <= w_rec;
          pos_x   <= x_c;
          pos_y   <= y_c;
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // All distance units run in lock step.
  assert property (@(posedge clk) disable iff (reset) e_valid == '0 || e_valid == '1);
  // The sort is only started when it is idle.
  assert property (@(posedge clk) disable iff (reset) sort_start |-> !sort_busy);

endmodule
