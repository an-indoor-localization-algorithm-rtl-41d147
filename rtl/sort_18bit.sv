// sort_18bit: k-nearest-neighbour selection by a sequential bubble sort.
//
// The N distance records {id, E} of the reference tags are loaded on start and sorted into
// ascending order of E with one compare-and-swap per clock: an inner index j walks the
// adjacent pairs (j, j+1) for j = 0 .. N-2, and the walk is repeated N-1 times, which is the
// bubble sort of the design. A pair is swapped only when a[j].E > a[j+1].E, so equal
// distances keep their input order. The first K records of the sorted array are the outputs
// o[0] (nearest) .. o[K-1].
//
// Interface: start (one-clock pulse, ignored while busy) loads in_tag[0..N-1]; busy is high
// while sorting; done pulses for one clock when o[] holds the result, which then stays until
// the next start. Timing: done is high (N-1)*(N-1) clocks after the edge that samples start,
// 64 clocks for N = 9.
// The record width, N = 9, K = 3 and the clk/reset pins follow the design; the start/busy/done
// handshake and one comparison per clock are this design's choices. Reset is synchronous,
// active high.
module sort_18bit
  import landmarc_pkg::*;
#(
  parameter int unsigned N = N_REF,
  parameter int unsigned K = K_NN
) (
  input  logic                      clk,
  input  logic                      reset,
  input  logic                      start,
  input  logic [N-1:0][DIST_W-1:0]  in_tag,
  output logic                      busy,
  output logic                      done,
  output logic [K-1:0][DIST_W-1:0]  o
);

  localparam int unsigned IDX_W = (N > 2) ? $clog2(N) : 1;

  dist_rec_t [N-1:0] a;
  logic [IDX_W-1:0]  j;     // pair index
  logic [IDX_W-1:0]  pass;  // completed passes

  always_ff @(posedge clk) begin
    if (reset) begin
      a    <= '0;
      j    <= '0;
      pass <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          for (int n = 0; n < N; n++) a[n] <= dist_rec_t'(in_tag[n]);
          j    <= '0;
          pass <= '0;
          busy <= 1'b1;
        end
      end else begin
        if (a[j].e > a[j+1].e) begin
          a[j]   <= a[j+1];
          a[j+1] <= a[j];
        end
        if (j == IDX_W'(N - 2)) begin
          j <= '0;
          if (pass == IDX_W'(N - 2)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            pass <= pass + 1'b1;
          end
        end else begin
          j <= j + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int n = 0; n < K; n++) o[n] = a[n];
  end

  initial begin
    assert (K <= N) else $error("sort_18bit: K must not exceed N");
  end

endmodule
