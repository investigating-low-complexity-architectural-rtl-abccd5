// tb_zw_memory: fills the whitened-matrix memory with random words at every
// (signal, sample) position, reads them back in random order and checks each
// word appears one cycle after its read, while writes go on meanwhile.
module tb_zw_memory;
  import ica_pkg::*;
  localparam int unsigned NMAX = 4, LMAX = 64;
  localparam int unsigned KBW = $clog2(NMAX), JBW = $clog2(LMAX);
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [KBW-1:0] wr_k = '0, rd_k = '0;
  logic [JBW-1:0] wr_j = '0, rd_j = '0;
  word_t wr_data = '0, rd_data;
  word_t ref_ [NMAX][LMAX];
  int checks = 0, failures = 0;
  zw_memory #(.NMAX(NMAX), .LMAX(LMAX)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < int'(NMAX); k++)
      for (int j = 0; j < int'(LMAX); j++) begin
        @(negedge clk);
        wr_en = 1; wr_k = KBW'(k); wr_j = JBW'(j); wr_data = word_t'($urandom);
        ref_[k][j] = wr_data;
      end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 2000; t++) begin
      int k, j, k2, j2;
      k = $urandom_range(NMAX - 1); j = $urandom_range(LMAX - 1);
      k2 = $urandom_range(NMAX - 1); j2 = $urandom_range(LMAX - 1);
      rd_en = 1; rd_k = KBW'(k); rd_j = JBW'(j);
      // a simultaneous write elsewhere
      wr_en = !(k2 == k && j2 == j); wr_k = KBW'(k2); wr_j = JBW'(j2); wr_data = word_t'($urandom);
      @(negedge clk);
      if (wr_en) ref_[k2][j2] = wr_data;
      rd_en = 0; wr_en = 0;
      checks++;
      if (rd_data != ref_[k][j]) begin failures++; $display("FAIL %0d %0d", k, j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
