// dht_m_reg: the frame-length register ("M" block) of the reconfigurable DHT.
//
// The DHT works on frames of M points, where M is chosen at run time and
// must be a multiple of the kernel size N, no larger than MMAX. A pulse on
// m_load with a legal m_in stores it; an illegal value (zero, not a multiple
// of N, above MMAX) leaves the stored value alone and raises m_err for one
// cycle. Besides M the block registers the values derived from it that the
// rest of the datapath needs: the number of sub-blocks B = M/N and the table
// address of k_1 for this M in the K memory.
// Timing: the new M is visible on the outputs the cycle after m_load.
// Reset value M = N (one kernel use) is this design's choice.
module dht_m_reg
  import dht_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned MMAX = 1024,
  localparam int unsigned MBW = $clog2(MMAX + 1),
  localparam int unsigned BBW = $clog2(MMAX / N + 1),
  localparam int unsigned KAW = $clog2(k_table_size(MMAX))
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           m_load,
  input  logic [MBW-1:0] m_in,
  output logic [MBW-1:0] m,
  output logic [BBW-1:0] nblk,
  output logic [KAW-1:0] kbase,
  output logic           m_err
);

  logic legal;
  always_comb begin
    legal = (m_in != '0) && (int'(m_in) <= int'(MMAX)) && ((int'(m_in) % int'(N)) == 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m     <= MBW'(N);
      nblk  <= BBW'(1);
      kbase <= KAW'(k_base(N));
      m_err <= 1'b0;
    end else begin
      m_err <= m_load && !legal;
      if (m_load && legal) begin
        m     <= m_in;
        nblk  <= BBW'(int'(m_in) / int'(N));
        kbase <= KAW'(k_base(int'(m_in)));
      end
    end
  end

endmodule
