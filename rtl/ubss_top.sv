// ubss_top: the two signal-separation front ends side by side.
//
// Underdetermined blind source separation (fewer sensors than sources)
// needs, for M > 1 sensors, the analytic signal of every mixture, and hence
// a Discrete Hilbert Transform that adapts to the frame length; for a single
// sensor (single-channel ICA) it needs a FastICA whose dimension N changes
// from case to case. This top holds one of each:
//   * dht_core: reconfigurable M-point DHT (N_DHT-point kernel, M up to
//     DHT_MMAX chosen at run time), ports prefixed dht_;
//   * fastica_core with its whitened-matrix memory zw_memory: CORDIC-based
//     FastICA for 2 .. ICA_NMAX signals of up to ICA_LMAX samples, ports
//     prefixed ica_.
// The two parts share only clock and reset; the blocks that would connect
// them in a complete separation system (time-frequency analysis, whitening,
// clustering and so on) are outside this design, so both parts' ports are
// brought out. Timing of each part is described in its own module.
module ubss_top
  import dht_pkg::*;
  import ica_pkg::*;
#(
  parameter int unsigned N_DHT    = 4,
  parameter int unsigned DHT_MMAX = 1024,
  parameter int unsigned ICA_NMAX = 8,
  parameter int unsigned ICA_LMAX = 1024,
  localparam int unsigned MBW = $clog2(DHT_MMAX + 1),
  localparam int unsigned BBW = $clog2(DHT_MMAX / N_DHT + 1),
  localparam int unsigned KBW = $clog2(ICA_NMAX),
  localparam int unsigned NBW = $clog2(ICA_NMAX + 1),
  localparam int unsigned JBW = $clog2(ICA_LMAX),
  localparam int unsigned LBW = $clog2(ICA_LMAX + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Reconfigurable DHT
  input  logic                 dht_m_load,
  input  logic [MBW-1:0]       dht_m_in,
  output logic                 dht_m_err,
  output logic [MBW-1:0]       dht_m_cur,
  input  logic                 dht_in_valid,
  output logic                 dht_in_ready,
  input  logic signed [XW-1:0] dht_in_data,
  output logic                 dht_out_valid,
  output logic [BBW-1:0]       dht_out_blk,
  output logic signed [HW-1:0] dht_out_h [N_DHT],
  output logic                 dht_busy,
  output logic                 dht_done,
  // CORDIC FastICA
  input  logic                 ica_z_wr,
  input  logic [KBW-1:0]       ica_z_wr_k,
  input  logic [JBW-1:0]       ica_z_wr_j,
  input  word_t                ica_z_wr_data,
  input  logic [NBW-1:0]       ica_n_sig,
  input  logic [LBW-1:0]       ica_l_len,
  input  logic [7:0]           ica_max_iter,
  input  word_t                ica_conv_tol,
  input  logic                 ica_w_rand,
  input  logic                 ica_w_wr,
  input  logic [KBW-1:0]       ica_w_idx,
  input  word_t                ica_w_data,
  input  logic                 ica_start,
  output logic                 ica_busy,
  output logic                 ica_done,
  output logic                 ica_converged,
  output logic [7:0]           ica_iters,
  output word_t                ica_w_out [ICA_NMAX]
);

  dht_core #(.N(N_DHT), .MMAX(DHT_MMAX)) u_dht (
    .clk, .rst_n,
    .m_load(dht_m_load), .m_in(dht_m_in), .m_err(dht_m_err), .m_cur(dht_m_cur),
    .in_valid(dht_in_valid), .in_ready(dht_in_ready), .in_data(dht_in_data),
    .out_valid(dht_out_valid), .out_blk(dht_out_blk), .out_h(dht_out_h),
    .busy(dht_busy), .done(dht_done));

  logic           z_rd;
  logic [KBW-1:0] z_k;
  logic [JBW-1:0] z_j;
  word_t          z_data;

  zw_memory #(.NMAX(ICA_NMAX), .LMAX(ICA_LMAX)) u_zw (
    .clk, .wr_en(ica_z_wr), .wr_k(ica_z_wr_k), .wr_j(ica_z_wr_j),
    .wr_data(ica_z_wr_data), .rd_en(z_rd), .rd_k(z_k), .rd_j(z_j),
    .rd_data(z_data));

  fastica_core #(.NMAX(ICA_NMAX), .LMAX(ICA_LMAX)) u_ica (
    .clk, .rst_n, .n_sig(ica_n_sig), .l_len(ica_l_len),
    .max_iter(ica_max_iter), .conv_tol(ica_conv_tol),
    .w_rand(ica_w_rand), .w_wr(ica_w_wr), .w_idx(ica_w_idx), .w_data(ica_w_data),
    .z_rd, .z_k, .z_j, .z_data, .start(ica_start), .busy(ica_busy),
    .done(ica_done), .converged(ica_converged), .iters(ica_iters),
    .w_out(ica_w_out));

endmodule
