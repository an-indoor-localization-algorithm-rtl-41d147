// sqrt_18bit: registered integer square root, q = floor(sqrt(i)).
//
// This is the last stage of the Euclidean distance unit: it turns the 18-bit sum of squared
// RSSI differences into the 10-bit distance E. The root is formed bit by bit, from the most
// significant result bit down, by the restoring (digit-by-digit) method: a trial bit is kept
// when (root + bit)^2 still does not exceed the radicand. The whole loop is combinational and
// the result is registered, so q is valid one clock after i. The input and output widths
// (18 and 10 bits) and the clock/reset pins follow the design; the algorithm and the single
// register stage are this design's choice. Reset is synchronous, active high, and clears q.
module sqrt_18bit #(
  parameter int unsigned IN_W  = 18,
  parameter int unsigned OUT_W = 10
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [IN_W-1:0]  i,
  output logic [OUT_W-1:0] q
);

  localparam int unsigned ROOT_BITS = (IN_W + 1) / 2;

  logic [OUT_W-1:0] root;

  always_comb begin
    logic [IN_W:0]      rem;
    logic [IN_W:0]      trial;
    logic [ROOT_BITS-1:0] r;
    rem = {1'b0, i};
    r   = '0;
    for (int b = ROOT_BITS - 1; b >= 0; b--) begin
      // (r + 2^b)^2 - r^2 = (2r + 2^b) * 2^b
      trial = ((IN_W+1)'(r) << (b + 1)) + ((IN_W+1)'(1) << (2 * b));
      if (trial <= rem) begin
        rem  = rem - trial;
        r[b] = 1'b1;
      end
    end
    root = OUT_W'(r);
  end

  always_ff @(posedge clk) begin
    if (reset) q <= '0;
    else       q <= root;
  end

endmodule
