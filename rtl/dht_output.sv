// dht_output: output stage ("O/P DHT") of the reconfigurable DHT.
//
// Output block H_i is the sum over j of M/N kernel results
// (H_i = sum_j K_(j-i mod M/N) X_j). This block keeps N accumulators: a
// valid kernel result with first set starts a new sum, later ones add to it,
// and a result with last set completes the block. The completed block is
// rescaled (KFRAC fractional bits dropped with rounding) and presented on
// h for one cycle with h_valid and its block index h_blk, so sample
// h(N*h_blk + r) is h[r]. Accumulating in the output stage follows the
// source's figure (kernel results flow into "O/P DHT"); the rounding and
// the output word width HW are this design's choice.
// Timing: h_valid one cycle after the kernel result marked last.
module dht_output
  import dht_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned MMAX = 1024,
  localparam int unsigned BBW = $clog2(MMAX / N + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 y_valid,
  input  logic                 first,
  input  logic                 last,
  input  logic [BBW-1:0]       blk,
  input  logic signed [PW-1:0] y [N],
  output logic                 h_valid,
  output logic [BBW-1:0]       h_blk,
  output logic signed [HW-1:0] h [N]
);

  logic signed [PW-1:0] acc [N];
  logic signed [PW-1:0] nxt [N];

  always_comb begin
    for (int r = 0; r < int'(N); r++)
      nxt[r] = first ? y[r] : acc[r] + y[r];
  end

  always_ff @(posedge clk) begin
    if (y_valid) acc <= nxt;
    if (y_valid && last) begin
      h_blk <= blk;
      for (int r = 0; r < int'(N); r++)
        h[r] <= HW'((nxt[r] + (PW'(1) <<< (KFRAC - 1))) >>> KFRAC);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) h_valid <= 1'b0;
    else        h_valid <= y_valid && last;
  end

endmodule
