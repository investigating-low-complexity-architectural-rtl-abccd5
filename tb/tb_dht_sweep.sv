// tb_dht_sweep: runs the DHT at its default sizes (N = 4, MMAX = 1024) for
// every frame length M = 4, 8, ..., 1024. For each frame it checks that the
// transform takes (M/N)^2 + 2 clocks, i.e. about half the 2 (M/N)^2 clocks
// of a systolic-array DHT, and compares 16 randomly chosen outputs per frame
// (all outputs for M <= 64) with the transform evaluated in floating point.
module tb_dht_sweep;
  import dht_pkg::*;

  localparam int unsigned N = 4, MMAX = 1024;
  localparam int unsigned MBW = $clog2(MMAX + 1), BBW = $clog2(MMAX / N + 1);

  logic clk = 0, rst_n = 0;
  logic m_load = 0, m_err, in_valid = 0, in_ready, out_valid, busy, done;
  logic [MBW-1:0] m_in = '0, m_cur;
  logic signed [XW-1:0] in_data = '0;
  logic [BBW-1:0] out_blk;
  logic signed [HW-1:0] out_h [N];

  int checks = 0, failures = 0, busy_cycles = 0;

  dht_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (busy) busy_cycles++;

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int x [MMAX];
    longint total = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 4; m <= int'(MMAX); m += 4) begin
      real tol;
      @(negedge clk); m_load = 1; m_in = MBW'(m);
      @(negedge clk); m_load = 0;
      for (int n = 0; n < m; n++) x[n] = int'($urandom_range(4000)) - 2000;
      busy_cycles = 0;
      for (int n = 0; n < m; n++) begin
        in_valid = 1; in_data = XW'(x[n]);
        @(posedge clk); #1;
      end
      in_valid = 0;
      tol = real'(m) / 2.0 * 2000.0 * (2.0 ** (-1.0 - real'(KFRAC))) + 1.0;
      while (!done) begin
        @(posedge clk); #1;
        if (out_valid)
          for (int r = 0; r < int'(N); r++)
            if (m <= 64 || $urandom_range(m / 16) == 0) begin
              int n; real href;
              n = int'(out_blk) * int'(N) + r;
              href = 0.0;
              for (int p = 0; p < m / 4; p++)
                href += (x[(n - 2*p - 1 + m) % m] - x[(n + 2*p + 1) % m]) /
                        $tan(3.14159265358979 * (2*p + 1) / m);
              href = href * 2.0 / m;
              check((href - out_h[r] <= tol) && (out_h[r] - href <= tol),
                    $sformatf("M=%0d h(%0d)=%0d ref %f", m, n, out_h[r], href));
            end
      end
      check(busy_cycles == (m / int'(N)) ** 2 + 2, $sformatf("M=%0d clocks %0d", m, busy_cycles));
      if (m > 8) check(busy_cycles < 2 * (m / int'(N)) ** 2, "faster than 2 (M/N)^2");
      total += busy_cycles;
      if (m % 128 == 0) $display("M=%0d: %0d transform clocks", m, busy_cycles);
    end
    $display("all M: %0d transform clocks in total", total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
