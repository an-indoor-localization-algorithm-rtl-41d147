// tb_w_16bit: weighted-coefficient unit against a 64-bit integer model and a real model.
// For random and corner-case distance triples the testbench computes
// inv = floor((2^20-1)/E^2) (2^20-1 for E = 0), tot = sum inv, W = floor(inv * 2^21 / tot)
// with 64-bit integers, and also checks that the weights add up to 1.0 (2^21) less at most
// K units and that the weight of the smallest E is within 1% of the real-valued weight.
module tb_w_16bit;
  import landmarc_pkg::*;
  localparam int K = 3;
  logic [K-1:0][DIST_W-1:0] i;
  logic [K-1:0][WREC_W-1:0] o;
  int unsigned checks = 0, failures = 0;

  w_16bit dut (.i(i), .o(o));

  task automatic run_one(int e0, int e1, int e2);
    longint unsigned e[K], inv[K], tot, w, wsum;
    real rinv[K], rtot, rw;
    e[0] = longint'(e0); e[1] = longint'(e1); e[2] = longint'(e2);
    tot = 0; rtot = 0.0;
    for (int k = 0; k < K; k++) begin
      inv[k] = (e[k] == 0) ? 64'd1048575 : 64'd1048575 / (e[k] * e[k]);
      tot += inv[k];
      rinv[k] = (e[k] == 0) ? 1.0e9 : 1.0 / real'(e[k] * e[k]);
      rtot += rinv[k];
    end
    for (int k = 0; k < K; k++) i[k] = {8'(k + 20), 10'(e[k])};
    #1;
    wsum = 0;
    for (int k = 0; k < K; k++) begin
      w = (tot == 0) ? 0 : (inv[k] << 21) / tot;
      wsum += longint'(o[k][21:0]);
      checks++;
      if (longint'(o[k][21:0]) != w || o[k][29:22] !== 8'(k + 20)) begin
        failures++;
        $display("E=(%0d,%0d,%0d) W[%0d]=%0d id=%0d, expected %0d", e0, e1, e2, k, o[k][21:0], o[k][29:22], w);
      end
    end
    if (tot != 0) begin
      checks++;
      if (wsum > (64'd1 << 21) || wsum + 64'(K) < (64'd1 << 21)) begin
        failures++; $display("E=(%0d,%0d,%0d) weights sum to %0d", e0, e1, e2, wsum);
      end
    end
    // Accuracy against the real formula while the reciprocals keep enough bits.
    if (e[0] <= 20 && e[1] <= 20 && e[2] <= 20 && e[0] > 0 && e[1] > 0 && e[2] > 0) begin
      rw = rinv[0] / rtot;
      checks++;
      if ((real'(o[0][21:0]) / 2097152.0 - rw) > 0.01 || (rw - real'(o[0][21:0]) / 2097152.0) > 0.01) begin
        failures++; $display("E=(%0d,%0d,%0d) W0=%f, real %f", e0, e1, e2, real'(o[0][21:0]) / 2097152.0, rw);
      end
    end
  endtask

  initial begin
    run_one(1, 1, 1);       // equal thirds
    run_one(1, 2, 4);
    run_one(0, 5, 9);       // target on a reference tag
    run_one(0, 0, 0);
    run_one(600, 700, 1023);// all reciprocals vanish
    run_one(510, 510, 3);
    for (int t = 0; t < 3000; t++) begin
      int a, b, c;
      a = (t % 2 == 1) ? $urandom_range(0, 20) : $urandom_range(0, 1023);
      b = (t % 2 == 1) ? $urandom_range(0, 20) : $urandom_range(0, 1023);
      c = (t % 2 == 1) ? $urandom_range(0, 20) : $urandom_range(0, 1023);
      run_one(a, b, c);
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
