// dht_k_memory: constant store ("K-Memory") of the reconfigurable DHT.
//
// It permanently holds k_q = (2/M) cot(pi (2q-1)/M), q = 1 .. M/4, for every
// frame length M = 4, 8, ..., MMAX, packed one M after another (M/4 words
// each, k_1 of frame length M at address kbase = Q(Q-1)/2 with Q = M/4).
// The contents are fixed; they are computed from that formula with integer
// arithmetic (dht_pkg: series for pi/M, then a rotation recurrence) when
// the memory is initialised, so the table is a ROM with computed contents.
//
// Kernel use (i, j) multiplies sub-vector X_j by the N x N sub-matrix of K
// whose upper-left entry sits at row N*i, column N*j. That sub-matrix is
// Toeplitz with only N non-zero diagonals, so it is fully given by N signed
// constants: kv[t] is the value on the diagonal r - c = 2t - (N-1), i.e.
// kv[0] is the top-right diagonal and kv[N-1] the bottom-left one, the order
// of the source's set Kset_i. The caller supplies s = (i - j) mod (M/N); for
// each t this block forms d = (N*s + 2t - (N-1)) mod M, folds it to an index
// q and a sign, reads k_q and applies the sign.
// Timing: rd_en at cycle c gives kv at cycle c+1.
module dht_k_memory
  import dht_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned MMAX = 1024,
  localparam int unsigned MBW = $clog2(MMAX + 1),
  localparam int unsigned BBW = $clog2(MMAX / N + 1),
  localparam int unsigned KSZ = k_table_size(MMAX),
  localparam int unsigned KAW = $clog2(KSZ)
) (
  input  logic                 clk,
  input  logic [MBW-1:0]       m,
  input  logic [KAW-1:0]       kbase,
  input  logic                 rd_en,
  input  logic [BBW-1:0]       s,
  output logic signed [KW-1:0] kv [N]
);

  logic signed [KW-1:0] rom [KSZ];

  initial begin : fill
    int unsigned idx;
    cs_t a1, a2, t;
    idx = 0;
    for (int unsigned mm = 4; mm <= MMAX; mm += 4) begin
      a1 = base_angle(mm);     // angle pi/m
      a2 = rotate(a1, a1);     // angle 2 pi/m
      t  = a1;
      for (int unsigned q = 1; q <= mm / 4; q++) begin
        rom[idx] = k_from(t, mm);
        t = rotate(t, a2);
        idx++;
      end
    end
  end

  logic [KAW-1:0] addr [N];
  logic           neg  [N];

  always_comb begin
    for (int t = 0; t < int'(N); t++) begin
      int d, q;
      d = int'(N) * int'(s) + 2 * t - (int'(N) - 1);
      if (d < 0) d = d + int'(m);
      if (2 * d < int'(m)) begin
        q      = (d + 1) / 2;
        neg[t] = 1'b0;
      end else begin
        q      = (int'(m) - d + 1) / 2;
        neg[t] = 1'b1;
      end
      addr[t] = KAW'(int'(kbase) + q - 1);
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      for (int t = 0; t < int'(N); t++)
        kv[t] <= neg[t] ? -rom[addr[t]] : rom[addr[t]];
  end

endmodule
