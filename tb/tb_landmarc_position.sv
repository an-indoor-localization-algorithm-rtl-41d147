// tb_landmarc_position: weighted-mean position against an independent model.
// The grid position of tag j (x = 1 + (j-1) mod 3, y = 1 + (j-1) div 3, units of d) is taken
// from a lookup table written out in the testbench; random weight triples over random ids
// (including ids 0 and 10..255, which have no position) are applied and x, y compared with
// sum W * coordinate.
module tb_landmarc_position;
  import landmarc_pkg::*;
  localparam int K = 3;
  logic [K-1:0][WREC_W-1:0] w;
  logic [POS_W-1:0]         x, y;
  int unsigned checks = 0, failures = 0;

  // Floor plan: tags 1..9, three per row, row by row.
  int unsigned gx[10] = '{0, 1, 2, 3, 1, 2, 3, 1, 2, 3};
  int unsigned gy[10] = '{0, 1, 1, 1, 2, 2, 2, 3, 3, 3};

  landmarc_position dut (.w(w), .x(x), .y(y));

  task automatic run_one(int id0, int id1, int id2, int w0, int w1, int w2);
    int ids[K], ws[K];
    longint unsigned ex, ey;
    ids = '{id0, id1, id2}; ws = '{w0, w1, w2};
    ex = 0; ey = 0;
    for (int k = 0; k < K; k++) begin
      w[k] = {8'(ids[k]), 22'(ws[k])};
      if (ids[k] >= 1 && ids[k] <= 9) begin
        ex += longint'(ws[k]) * gx[ids[k]];
        ey += longint'(ws[k]) * gy[ids[k]];
      end
    end
    #1;
    checks++;
    if (longint'(x) != ex || longint'(y) != ey) begin
      failures++;
      $display("ids %0d %0d %0d: got (%0d,%0d), expected (%0d,%0d)", id0, id1, id2, x, y, ex, ey);
    end
  endtask

  initial begin
    run_one(1, 2, 3, 1 << 21, 0, 0);                         // exactly on tag 1: (1,1)
    run_one(9, 5, 1, 699050, 699050, 699050);                // near centre
    run_one(6, 3, 9, 1 << 20, 1 << 19, 1 << 19);
    run_one(0, 10, 255, 1 << 20, 1 << 19, 1 << 19);          // no position: (0,0)
    // Weights as the weight unit delivers them: together at most 1.0.
    for (int t = 0; t < 3000; t++) begin
      int a, b, c;
      a = $urandom_range(0, 1 << 21);
      b = $urandom_range(0, (1 << 21) - a);
      c = $urandom_range(0, (1 << 21) - a - b);
      run_one($urandom_range(0, 11), $urandom_range(1, 9), $urandom_range(1, 9), a, b, c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
