// tb_sort_18bit: bubble-sort k-nearest-neighbour selector against a reference sort.
// Random sets of nine {id, E} records (some with repeated E values) are loaded with start;
// done must come exactly (N-1)^2 = 64 clocks later and o[0..2] must equal the first three
// records of a stable ascending sort done in the testbench. A start while busy is ignored.
module tb_sort_18bit;
  import landmarc_pkg::*;
  localparam int N = 9, K = 3;
  logic                      clk = 1'b0;
  logic                      reset;
  logic                      start;
  logic [N-1:0][DIST_W-1:0]  in_tag;
  logic                      busy, done;
  logic [K-1:0][DIST_W-1:0]  o;
  int unsigned checks = 0, failures = 0;

  sort_18bit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(logic [N-1:0][DIST_W-1:0] recs, bit poke_start);
    logic [DIST_W-1:0] ref_a[N];
    logic [DIST_W-1:0] tmp;
    int cycles;
    // Reference: stable insertion sort on the E field.
    for (int n = 0; n < N; n++) ref_a[n] = recs[n];
    for (int n = 1; n < N; n++) begin
      tmp = ref_a[n];
      for (int m = n - 1; m >= 0; m--) begin
        if (ref_a[m][9:0] > tmp[9:0]) begin
          ref_a[m+1] = ref_a[m];
          ref_a[m]   = tmp;
        end else break;
      end
    end
    in_tag = recs; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    in_tag = '0;
    cycles = 0;
    while (!done && cycles < 1000) begin
      if (poke_start && cycles == 10) begin
        start = 1'b1;    // must be ignored while busy
        in_tag = '1;
      end else begin
        start = 1'b0;
      end
      @(posedge clk); #1;
      cycles++;
    end
    start = 1'b0;
    checks++;
    if (cycles != (N - 1) * (N - 1)) begin
      failures++; $display("done after %0d clocks, expected %0d", cycles, (N - 1) * (N - 1));
    end
    for (int k = 0; k < K; k++) begin
      checks++;
      if (o[k] !== ref_a[k]) begin
        failures++; $display("o[%0d] = %h, expected %h", k, o[k], ref_a[k]);
      end
    end
    @(posedge clk); #1;
    checks++;
    if (done || busy) begin failures++; $display("done/busy not cleared"); end
  endtask

  initial begin
    logic [N-1:0][DIST_W-1:0] r;
    reset = 1'b1; start = 1'b0; in_tag = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    checks++;
    if (busy || done) begin failures++; $display("busy/done after reset"); end
    // Descending input: worst case for bubble sort.
    for (int n = 0; n < N; n++) r[n] = {8'(n + 1), 10'(900 - 100 * n)};
    run_one(r, 1'b1);
    // Equal distances must keep input order.
    for (int n = 0; n < N; n++) r[n] = {8'(n + 1), 10'(5)};
    run_one(r, 1'b0);
    for (int t = 0; t < 500; t++) begin
      for (int n = 0; n < N; n++) r[n] = {8'(n + 1), 10'((t % 2 == 1) ? $urandom_range(0, 15) : $urandom_range(0, 1023))};
      run_one(r, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
