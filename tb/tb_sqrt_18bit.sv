// tb_sqrt_18bit: exhaustive check of the registered integer square root.
// Every 18-bit radicand is applied; one clock later q must satisfy q^2 <= i < (q+1)^2,
// a property checked with plain integer arithmetic. Reset must clear q.
module tb_sqrt_18bit;
  logic        clk = 1'b0;
  logic        reset;
  logic [17:0] i;
  logic [9:0]  q;
  int unsigned checks = 0, failures = 0;

  sqrt_18bit dut (.clk(clk), .reset(reset), .i(i), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned v, r;
    reset = 1'b1;
    i     = 18'h3ffff;
    @(posedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("reset did not clear q"); end
    reset = 1'b0;
    for (v = 0; v < (1 << 18); v++) begin
      i = 18'(v);
      @(posedge clk); #1;
      r = longint'(q);
      checks++;
      if (!(r * r <= v && (r + 1) * (r + 1) > v)) begin
        failures++;
        if (failures < 10) $display("sqrt(%0d) gave %0d", v, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
