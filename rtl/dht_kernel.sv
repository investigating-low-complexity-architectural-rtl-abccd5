// dht_kernel: the N-point kernel of the reconfigurable DHT.
//
// One use of the kernel computes y = K_s * X_j, an N x N Toeplitz
// sub-matrix times an N-sample sub-vector. The sub-matrix arrives as its N
// non-zero diagonals kv[t] (diagonal r - c = 2t - (N-1)); entries on the
// other diagonals (r - c even) are zero, so each output needs N/2 products:
//   y[r] = sum over c with r - c odd of kv[(r - c + N - 1)/2] * x[c].
// The kernel is fully parallel (N*N/2 multipliers) and registered: one new
// kernel use per clock, result one cycle after en. y keeps the KFRAC
// fractional bits of the constants. The matrix-vector kernel follows the
// source; its parallel single-cycle form is this design's choice, made so
// that an M-point transform takes (M/N)^2 kernel clocks.
module dht_kernel
  import dht_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x  [N],
  input  logic signed [KW-1:0] kv [N],
  output logic                 y_valid,
  output logic signed [PW-1:0] y  [N]
);

  logic signed [PW-1:0] sum [N];

  always_comb begin
    for (int r = 0; r < int'(N); r++) begin
      sum[r] = '0;
      for (int c = 0; c < int'(N); c++)
        if (((r - c) % 2) != 0)
          sum[r] = sum[r] + PW'(kv[(r - c + int'(N) - 1) / 2] * x[c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= en;
  end

  always_ff @(posedge clk) begin
    if (en) y <= sum;
  end

endmodule
