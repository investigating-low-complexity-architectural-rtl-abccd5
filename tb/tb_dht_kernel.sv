// tb_dht_kernel: random sub-vectors and diagonal constants; the result must
// equal the product of the N x N Toeplitz matrix (built here entry by entry,
// zero on the even diagonals) with the sub-vector, one cycle after en.
module tb_dht_kernel;
  import dht_pkg::*;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, en = 0, y_valid;
  logic signed [XW-1:0] x [N];
  logic signed [KW-1:0] kv [N];
  logic signed [PW-1:0] y [N];
  int checks = 0, failures = 0;
  dht_kernel #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    longint mat [N][N];
    longint ref_;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int i = 0; i < int'(N); i++) begin x[i] = XW'($urandom); kv[i] = KW'($urandom); end
      for (int r = 0; r < int'(N); r++)
        for (int c = 0; c < int'(N); c++)
          mat[r][c] = ((r - c) % 2 == 0) ? 0 : longint'(kv[(r - c + int'(N) - 1) / 2]);
      en = 1;
      @(negedge clk); en = 0;
      checks++; if (!y_valid) failures++;
      for (int r = 0; r < int'(N); r++) begin
        ref_ = 0;
        for (int c = 0; c < int'(N); c++) ref_ += mat[r][c] * longint'(x[c]);
        checks++;
        if (longint'(y[r]) != ref_) begin failures++; $display("FAIL r=%0d %0d %0d", r, y[r], ref_); end
      end
      @(negedge clk);
      checks++; if (y_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
