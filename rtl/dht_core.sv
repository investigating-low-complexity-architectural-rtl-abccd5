// dht_core: reconfigurable M-point Discrete Hilbert Transform.
//
// h(n) = sum_{p=0}^{M/4-1} (x((n-2p-1) mod M) - x((n+2p+1) mod M)) k_(p+1),
// k_q = (2/M) cot(pi (2q-1)/M), computed as h = K x with the circulant
// matrix K cut into (M/N)^2 sub-matrices of N x N. A single N-point kernel
// is reused for every sub-matrix, so one chip with fixed N serves any frame
// length M that is a multiple of N up to MMAX.
//
// Use: load M (m_load/m_in; ignored while busy), then stream the M samples
// of a frame on in_valid/in_data (in_ready high while the frame buffer has
// room). Once the frame is complete the transform runs by itself, one
// kernel use per clock, and delivers output block i, samples
// h(N*i .. N*i+N-1), on out_h with out_valid and out_blk = i, blocks in
// order 0 .. M/N-1. done marks the last block; the buffer is then free for
// the next frame. A frame takes M clocks to load and (M/N)^2 + 2 clocks to
// transform. Outputs are integers (the KFRAC scaling of the constants is
// removed with rounding).
//
// The block structure (M register, X memory, K memory, N-point kernel,
// output stage, controller) follows the source's architecture; word widths,
// handshakes and the pipeline are this design's choice.
module dht_core
  import dht_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned MMAX = 1024,
  localparam int unsigned MBW = $clog2(MMAX + 1),
  localparam int unsigned BBW = $clog2(MMAX / N + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 m_load,
  input  logic [MBW-1:0]       m_in,
  output logic                 m_err,
  output logic [MBW-1:0]       m_cur,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [XW-1:0] in_data,
  output logic                 out_valid,
  output logic [BBW-1:0]       out_blk,
  output logic signed [HW-1:0] out_h [N],
  output logic                 busy,
  output logic                 done
);

  localparam int unsigned KAW = $clog2(k_table_size(MMAX));

  initial begin
    assert (N % 4 == 0 && N >= 4) else $fatal(1, "kernel size N must be a multiple of 4");
    assert (MMAX % N == 0) else $fatal(1, "MMAX must be a multiple of N");
  end

  logic [BBW-1:0] nblk, x_blk, k_s, o_blk;
  logic [KAW-1:0] kbase;
  logic data_ready, x_clear, x_rd, k_rd, kern_en, o_first, o_last, y_valid;
  logic signed [XW-1:0] xv [N];
  logic signed [KW-1:0] kv [N];
  logic signed [PW-1:0] y  [N];

  dht_m_reg #(.N(N), .MMAX(MMAX)) u_m (
    .clk, .rst_n, .m_load(m_load && !busy && !data_ready), .m_in,
    .m(m_cur), .nblk, .kbase, .m_err);

  dht_x_memory #(.N(N), .MMAX(MMAX)) u_x (
    .clk, .rst_n, .m(m_cur), .clear(x_clear),
    .wr_valid(in_valid && !busy), .wr_ready(in_ready), .wr_data(in_data),
    .data_ready, .rd_en(x_rd), .rd_blk(x_blk), .rd_x(xv));

  dht_k_memory #(.N(N), .MMAX(MMAX)) u_k (
    .clk, .m(m_cur), .kbase, .rd_en(k_rd), .s(k_s), .kv);

  dht_controller #(.N(N), .MMAX(MMAX)) u_ctrl (
    .clk, .rst_n, .nblk, .data_ready, .busy, .done, .x_clear,
    .x_rd, .x_blk, .k_rd, .k_s, .kern_en, .o_first, .o_last, .o_blk);

  dht_kernel #(.N(N)) u_kern (
    .clk, .rst_n, .en(kern_en), .x(xv), .kv, .y_valid, .y);

  dht_output #(.N(N), .MMAX(MMAX)) u_out (
    .clk, .rst_n, .y_valid, .first(o_first), .last(o_last), .blk(o_blk), .y,
    .h_valid(out_valid), .h_blk(out_blk), .h(out_h));

endmodule
