// tb_landmarc: end-to-end test of the LANDMARC localization engine at its default size.
//
// Readings come from a simple floor model: four readers at (1.5,1.5), (2.5,1.5), (1.5,2.5) and
// (2.5,2.5) in units of the tag spacing d, nine reference tags at (1..3, 1..3), and an RSSI that
// falls linearly with distance (255 - 50 * distance, clipped, plus a little noise). For each
// localization the testbench computes, independently of the RTL, the distances with real
// arithmetic, a stable sort, the fixed-point weights and the position, and compares nearest[],
// w_out[], pos_x and pos_y when done pulses; done must come 68 clocks after start.
// It also requires each mechanism of the engine to occur at least once: a sort that has to
// swap records, equal distances (a tie), a zero distance (target reading equal to a reference
// reading, the saturated reciprocal), a start ignored while busy, and back-to-back operation.
// Finally the estimate must land within one tag spacing of the true position for noise-free
// readings of targets inside the grid.
module tb_landmarc;
  import landmarc_pkg::*;

  logic                          clk = 1'b0;
  logic                          reset;
  logic                          start;
  logic [N_REF-1:0][TAG_W-1:0]   ref_tag;
  logic [TAG_W-1:0]              target;
  logic                          busy, done;
  logic [K_NN-1:0][DIST_W-1:0]   nearest;
  logic [K_NN-1:0][WREC_W-1:0]   w_out;
  logic [POS_W-1:0]              pos_x, pos_y;
  int unsigned checks = 0, failures = 0;
  int unsigned n_swap = 0, n_tie = 0, n_zero = 0, n_ignored = 0, n_b2b = 0, n_ops = 0;

  landmarc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real rdx[4] = '{1.5, 2.5, 1.5, 2.5};
  real rdy[4] = '{1.5, 1.5, 2.5, 2.5};

  function automatic logic [7:0] rssi_at(real px, real py, int r, int noise);
    real d, v;
    d = $sqrt((px - rdx[r]) * (px - rdx[r]) + (py - rdy[r]) * (py - rdy[r]));
    v = 255.0 - 50.0 * d + real'(noise);
    if (v < 0.0) v = 0.0;
    if (v > 255.0) v = 255.0;
    return 8'(int'($floor(v)));
  endfunction

  function automatic logic [TAG_W-1:0] reading(int id, real px, real py, int noise_amp);
    logic [TAG_W-1:0] t;
    t[39:32] = 8'(id);
    for (int r = 0; r < 4; r++) begin
      int nz = (noise_amp == 0) ? 0 : $urandom_range(0, 2 * noise_amp) - noise_amp;
      t[(3 - r) * 8 +: 8] = rssi_at(px, py, r, nz);   // r1 in bits 31:24
    end
    return t;
  endfunction

  // Expected results of one localization.
  logic [DIST_W-1:0] exp_near[K_NN];
  logic [WREC_W-1:0] exp_w[K_NN];
  longint unsigned   exp_x, exp_y;

  task automatic model(logic [N_REF-1:0][TAG_W-1:0] refs, logic [TAG_W-1:0] tgt);
    logic [DIST_W-1:0] a[N_REF];
    logic [DIST_W-1:0] tmp;
    longint unsigned inv[K_NN], tot, w;
    bit swapped = 0, tie = 0;
    for (int j = 0; j < N_REF; j++) begin
      real s = 0.0;
      for (int n = 0; n < 4; n++) begin
        int q = int'(refs[j][n*8 +: 8]);
        int p = int'(tgt[n*8 +: 8]);
        s += real'((q - p) * (q - p));
      end
      a[j] = {refs[j][39:32], 10'(int'($floor($sqrt(s) + 1e-9)))};
    end
    for (int j = 1; j < N_REF; j++) begin
      tmp = a[j];
      for (int m = j - 1; m >= 0; m--) begin
        if (a[m][9:0] > tmp[9:0]) begin
          a[m+1] = a[m]; a[m] = tmp; swapped = 1;
        end else begin
          if (a[m][9:0] == tmp[9:0]) tie = 1;
          break;
        end
      end
    end
    if (swapped) n_swap++;
    if (tie) n_tie++;
    if (a[0][9:0] == 0) n_zero++;
    tot = 0;
    for (int k = 0; k < K_NN; k++) begin
      longint unsigned e = longint'(a[k][9:0]);
      exp_near[k] = a[k];
      inv[k] = (e == 0) ? 64'd1048575 : 64'd1048575 / (e * e);
      tot += inv[k];
    end
    exp_x = 0; exp_y = 0;
    for (int k = 0; k < K_NN; k++) begin
      int id = int'(a[k][17:10]);
      w = (tot == 0) ? 0 : (inv[k] << 21) / tot;
      exp_w[k] = {a[k][17:10], 22'(w)};
      if (id >= 1 && id <= 9) begin
        exp_x += w * ((longint'(id) - 1) % 3 + 1);
        exp_y += w * ((longint'(id) - 1) / 3 + 1);
      end
    end
  endtask

  // One localization; returns the estimate error in units of d.
  task automatic localize(real px, real py, int noise, bit exact_copy, bit poke, bit b2b,
                          output real err);
    logic [N_REF-1:0][TAG_W-1:0] refs;
    logic [TAG_W-1:0] tgt;
    int cycles;
    for (int j = 0; j < N_REF; j++)
      refs[j] = reading(j + 1, real'(j % 3 + 1), real'(j / 3 + 1), 0);
    tgt = reading(0, px, py, noise);
    if (exact_copy) tgt[31:0] = refs[4][31:0];   // same readings as tag 5
    model(refs, tgt);
    ref_tag = refs; target = tgt; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    ref_tag = '0; target = '0;                   // inputs need only be held for the start clock
    cycles = 0;
    while (!done && cycles < 500) begin
      if (poke && cycles == 30) begin
        start = 1'b1;
        if (busy) n_ignored++;
      end else start = 1'b0;
      @(posedge clk); #1;
      cycles++;
    end
    start = 1'b0;
    n_ops++;
    checks++;
    if (cycles != 68) begin failures++; $display("done after %0d clocks, expected 68", cycles); end
    for (int k = 0; k < K_NN; k++) begin
      checks += 2;
      if (nearest[k] !== exp_near[k]) begin
        failures++; $display("nearest[%0d] = %h, expected %h", k, nearest[k], exp_near[k]);
      end
      if (w_out[k] !== exp_w[k]) begin
        failures++; $display("w_out[%0d] = %h, expected %h", k, w_out[k], exp_w[k]);
      end
    end
    checks++;
    if (longint'(pos_x) != exp_x || longint'(pos_y) != exp_y) begin
      failures++; $display("pos = (%0d,%0d), expected (%0d,%0d)", pos_x, pos_y, exp_x, exp_y);
    end
    err = $sqrt((real'(pos_x) / 2097152.0 - px) ** 2 + (real'(pos_y) / 2097152.0 - py) ** 2);
    if (!b2b) begin
      @(posedge clk); #1;
      checks++;
      if (busy || done) begin failures++; $display("busy/done not cleared after done"); end
    end else begin
      n_b2b++;
    end
  endtask

  initial begin
    real err, worst;
    reset = 1'b1; start = 1'b0; ref_tag = '0; target = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    checks++;
    if (busy || done) begin failures++; $display("busy/done after reset"); end

    localize(2.0, 2.0, 0, 1'b1, 1'b0, 1'b0, err);     // zero distance, tag 5
    checks++;
    if (err > 0.01) begin
      failures++; $display("zero-distance estimate (%0d,%0d) is not on tag 5", pos_x, pos_y);
    end
    localize(2.0, 2.0, 0, 1'b0, 1'b0, 1'b0, err);     // symmetric: ties between tags
    localize(3.2, 1.9, 0, 1'b0, 1'b1, 1'b0, err);     // start while busy
    localize(1.3, 2.7, 0, 1'b0, 1'b0, 1'b1, err);     // then back to back
    localize(2.6, 2.2, 0, 1'b0, 1'b0, 1'b0, err);
    worst = 0.0;
    for (int t = 0; t < 200; t++) begin
      real px, py;
      px = 1.0 + 2.0 * real'($urandom_range(0, 1000)) / 1000.0;
      py = 1.0 + 2.0 * real'($urandom_range(0, 1000)) / 1000.0;
      localize(px, py, 0, 1'b0, 1'b0, t % 3 == 1, err);
      if (err > worst) worst = err;
    end
    checks++;
    if (worst > 1.0) begin failures++; $display("worst noise-free error %f d", worst); end
    for (int t = 0; t < 200; t++) begin
      real px, py;
      px = 4.0 * real'($urandom_range(0, 1000)) / 1000.0;
      py = 4.0 * real'($urandom_range(0, 1000)) / 1000.0;
      localize(px, py, 6, 1'b0, 1'b0, 1'b0, err);
    end
    $display("operations %0d, sorts with swaps %0d, ties %0d, zero distances %0d, ignored starts %0d, back-to-back %0d, worst error %f d",
             n_ops, n_swap, n_tie, n_zero, n_ignored, n_b2b, worst);
    checks += 5;
    if (n_swap == 0)    begin failures++; $display("no sort needed a swap"); end
    if (n_tie == 0)     begin failures++; $display("no tie occurred"); end
    if (n_zero == 0)    begin failures++; $display("no zero distance occurred"); end
    if (n_ignored == 0) begin failures++; $display("no start while busy"); end
    if (n_b2b == 0)     begin failures++; $display("no back-to-back operation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
