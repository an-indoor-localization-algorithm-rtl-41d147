// tb_e_8bit: Euclidean distance unit against a real-valued model.
// Random readings, plus the extreme cases (identical readings, all differences 255), are
// applied with in_valid; two clocks later out_valid must rise and o_tag must hold the
// reference id and floor(sqrt(sum (Q-S)^2)), the model using real arithmetic.
module tb_e_8bit;
  import landmarc_pkg::*;
  logic              clk = 1'b0;
  logic              reset;
  logic              in_valid;
  logic [TAG_W-1:0]  tag, target;
  logic              out_valid;
  logic [DIST_W-1:0] o_tag;
  int unsigned checks = 0, failures = 0;

  e_8bit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_e(logic [TAG_W-1:0] a, logic [TAG_W-1:0] b);
    real s = 0.0;
    for (int n = 0; n < 4; n++) begin
      int qa = int'(a[n*8 +: 8]);
      int sb = int'(b[n*8 +: 8]);
      s += real'((qa - sb) * (qa - sb));
    end
    return int'($floor($sqrt(s) + 1e-9));
  endfunction

  task automatic run_one(logic [TAG_W-1:0] a, logic [TAG_W-1:0] b);
    int exp_e;
    tag = a; target = b; in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    checks++;
    if (out_valid) begin failures++; $display("out_valid after one clock"); end
    @(posedge clk); #1;
    exp_e = model_e(a, b);
    checks++;
    if (!out_valid || o_tag[17:10] !== a[39:32] || int'(o_tag[9:0]) != exp_e) begin
      failures++;
      $display("tag=%h target=%h: got valid=%b id=%0d E=%0d, expected id=%0d E=%0d",
               a, b, out_valid, o_tag[17:10], o_tag[9:0], a[39:32], exp_e);
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("out_valid stuck high"); end
  endtask

  initial begin
    reset = 1'b1; in_valid = 1'b0; tag = '0; target = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    run_one(40'h05_11_22_33_44, 40'h00_11_22_33_44);   // E = 0
    run_one(40'h07_ff_ff_ff_ff, 40'h00_00_00_00_00);   // E = 510
    run_one(40'h03_00_00_00_00, 40'h00_ff_ff_ff_ff);   // E = 510, S > Q
    run_one(40'h01_0a_14_1e_28, 40'h00_0d_10_1e_2c);   // 3,4,0,4 -> sqrt(41) = 6
    for (int t = 0; t < 2000; t++) begin
      run_one({8'($urandom), 32'($urandom)}, {8'($urandom), 32'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
