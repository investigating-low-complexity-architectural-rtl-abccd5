// tb_dht_output: feeds groups of B kernel results (first/last marked, with
// gaps between them) and checks the emitted block: the rounded sum with the
// KFRAC scaling removed, the block index, and a one-cycle h_valid.
module tb_dht_output;
  import dht_pkg::*;
  localparam int unsigned N = 4, MMAX = 64, BBW = $clog2(MMAX / N + 1);
  logic clk = 0, rst_n = 0, y_valid = 0, first = 0, last = 0, h_valid;
  logic [BBW-1:0] blk = '0, h_blk;
  logic signed [PW-1:0] y [N];
  logic signed [HW-1:0] h [N];
  int checks = 0, failures = 0;
  dht_output #(.N(N), .MMAX(MMAX)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    longint sum [N];
    repeat (2) @(posedge clk); rst_n = 1;
    for (int g = 0; g < 100; g++) begin
      int b;
      b = 1 + int'($urandom_range(7));
      foreach (sum[r]) sum[r] = 0;
      for (int j = 0; j < b; j++) begin
        @(negedge clk);
        y_valid = 1; first = (j == 0); last = (j == b - 1); blk = BBW'(g % 16);
        for (int r = 0; r < int'(N); r++) begin
          y[r] = PW'(int'($urandom_range(2000000)) - 1000000);
          sum[r] += longint'(y[r]);
        end
        @(negedge clk); y_valid = 0; first = 0; last = 0;
        checks++; if (h_valid != (j == b - 1)) begin failures++; $display("FAIL h_valid"); end
        if (j == b - 1) begin
          checks++; if (h_blk != BBW'(g % 16)) failures++;
          for (int r = 0; r < int'(N); r++) begin
            longint e;
            e = (sum[r] + (longint'(1) << (KFRAC - 1))) >>> KFRAC;
            checks++;
            if (longint'(h[r]) != e) begin failures++; $display("FAIL h %0d %0d", h[r], e); end
          end
        end
        if ($urandom_range(1)) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
