// zw_memory: storage for the whitened signal matrix X_w of the FastICA.
//
// Holds up to NMAX whitened signals of up to LMAX samples each; sample j of
// signal k lives at row k, column j. One write port (loaded by the host
// before a run) and one synchronous read port (used by the FastICA
// datapath): rd_en at cycle c gives rd_data at cycle c+1. The matrix is the
// input of the source's FastICA; the memory organisation is this design's.
module zw_memory
  import ica_pkg::*;
#(
  parameter int unsigned NMAX = 8,
  parameter int unsigned LMAX = 1024,
  localparam int unsigned KBW = $clog2(NMAX),
  localparam int unsigned JBW = $clog2(LMAX)
) (
  input  logic           clk,
  input  logic           wr_en,
  input  logic [KBW-1:0] wr_k,
  input  logic [JBW-1:0] wr_j,
  input  word_t          wr_data,
  input  logic           rd_en,
  input  logic [KBW-1:0] rd_k,
  input  logic [JBW-1:0] rd_j,
  output word_t          rd_data
);

  word_t mem [NMAX * LMAX];

  always_ff @(posedge clk) begin
    if (wr_en) mem[int'(wr_k) * int'(LMAX) + int'(wr_j)] <= wr_data;
    if (rd_en) rd_data <= mem[int'(rd_k) * int'(LMAX) + int'(rd_j)];
  end

endmodule
