// dht_x_memory: input-frame buffer ("X Memory") of the reconfigurable DHT.
//
// Samples arrive one per cycle on wr_valid/wr_data and are written at
// consecutive addresses 0 .. M-1. After the M-th sample data_ready rises and
// stays high until clear; further samples are refused (wr_ready low). The
// memory is split into N banks, bank b holding x(N*q + b), so that the N
// samples of one sub-vector X_j = x(N*j + 0 .. N*j + N-1) are read in a
// single cycle: rd_en with block index rd_blk returns X_j on rd_x the next
// cycle (synchronous read). Storing the frame before the kernel runs follows
// the source; the banked layout and the one-cycle read latency are this
// design's choice.
module dht_x_memory
  import dht_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned MMAX = 1024,
  localparam int unsigned MBW = $clog2(MMAX + 1),
  localparam int unsigned BBW = $clog2(MMAX / N + 1),
  localparam int unsigned DEPTH = MMAX / N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [MBW-1:0]       m,          // current frame length
  input  logic                 clear,      // start a new frame
  input  logic                 wr_valid,
  output logic                 wr_ready,
  input  logic signed [XW-1:0] wr_data,
  output logic                 data_ready, // all M samples stored
  input  logic                 rd_en,
  input  logic [BBW-1:0]       rd_blk,
  output logic signed [XW-1:0] rd_x [N]
);

  logic signed [XW-1:0] bank [N][DEPTH];
  logic [MBW-1:0] wr_cnt;

  assign wr_ready = !data_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_cnt     <= '0;
      data_ready <= 1'b0;
    end else if (clear) begin
      wr_cnt     <= '0;
      data_ready <= 1'b0;
    end else if (wr_valid && wr_ready) begin
      wr_cnt <= wr_cnt + 1'b1;
      if (wr_cnt + 1'b1 == m) data_ready <= 1'b1;
    end
  end

  // Bank write: sample address a goes to bank a mod N, row a / N.
  always_ff @(posedge clk) begin
    if (!clear && wr_valid && wr_ready)
      bank[int'(wr_cnt) % int'(N)][int'(wr_cnt) / int'(N)] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      for (int b = 0; b < int'(N); b++) rd_x[b] <= bank[b][rd_blk];
  end

endmodule
