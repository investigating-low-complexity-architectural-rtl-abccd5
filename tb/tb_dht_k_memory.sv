// tb_dht_k_memory: for every legal M (multiple of N up to MMAX) and every
// sub-matrix offset s, checks the N signed constants against the entries of
// the full DHT matrix K[n][m] (built here from the defining sum with real
// arithmetic): kv[t] must equal K[N*s + r][c] on diagonal r - c = 2t - N + 1.
// Also checks the worked example of the source for M = 16, N = 8.
module tb_dht_k_memory;
  import dht_pkg::*;
  localparam int unsigned N = 8, MMAX = 128;
  localparam int unsigned MBW = $clog2(MMAX + 1), BBW = $clog2(MMAX / N + 1);
  localparam int unsigned KAW = $clog2(k_table_size(MMAX));
  logic clk = 0, rd_en = 0;
  logic [MBW-1:0] m = '0;
  logic [KAW-1:0] kbase = '0;
  logic [BBW-1:0] s = '0;
  logic signed [KW-1:0] kv [N];
  int checks = 0, failures = 0;
  dht_k_memory #(.N(N), .MMAX(MMAX)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string s_);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s_); end
  endtask
  // entry (n, col) of the M-point DHT matrix, in units of 2^-KFRAC
  function automatic real kref(input int mm, input int n, input int col);
    real v = 0;
    for (int p = 0; p < mm / 4; p++) begin
      real c = 2.0 / mm / $tan(3.14159265358979 * (2 * p + 1) / mm);
      if (((n - 2 * p - 1) % mm + mm) % mm == col) v += c;
      if ((n + 1 + 2 * p) % mm == col) v -= c;
    end
    return v * (2.0 ** KFRAC);
  endfunction
  initial begin
    for (int mm = int'(N); mm <= int'(MMAX); mm += int'(N)) begin
      for (int ss = 0; ss < mm / int'(N); ss++) begin
        @(negedge clk);
        m = MBW'(mm); kbase = KAW'((mm / 4) * (mm / 4 - 1) / 2); s = BBW'(ss); rd_en = 1;
        @(negedge clk); rd_en = 0;
        for (int t = 0; t < int'(N); t++) begin
          int r, c; real ref_;
          // pick an entry of the diagonal 2t - N + 1 inside an N x N block
          r = (2 * t - int'(N) + 1 >= 0) ? 2 * t - int'(N) + 1 : 0;
          c = r - (2 * t - int'(N) + 1);
          ref_ = kref(mm, ss * int'(N) + r, c);
          chk(real'(kv[t]) - ref_ <= 1.0 && ref_ - real'(kv[t]) <= 1.0,
              $sformatf("M=%0d s=%0d t=%0d kv=%0d ref=%f", mm, ss, t, kv[t], ref_));
        end
      end
    end
    // worked example: M = 16, N = 8: K_1 (s = 0) = {-k4,-k3,-k2,-k1,k1,k2,k3,k4},
    // K_2 (s = 1) = {k1,k2,k3,k4,-k4,-k3,-k2,-k1}
    @(negedge clk); m = 16; kbase = KAW'(6); s = 0; rd_en = 1;
    @(negedge clk); rd_en = 0;
    for (int t = 0; t < 4; t++) chk(kv[t] == -kv[7 - t], "K_1 antisymmetric");
    chk(kv[4] > kv[5] && kv[5] > kv[6] && kv[6] > kv[7] && kv[7] > 0, "K_1 order");
    s = 1; rd_en = 1; @(negedge clk); rd_en = 0;
    chk(kv[0] > kv[1] && kv[3] > 0 && kv[4] == -kv[3] && kv[7] == -kv[0], "K_2 order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
