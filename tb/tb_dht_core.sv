// tb_dht_core: self-checking test of the reconfigurable DHT.
//
// For several frame lengths M (multiples of N up to MMAX) it loads M, streams
// a random frame, collects the M/N output blocks and compares every h(n)
// against the transform evaluated directly in floating point from the
// defining sum h(n) = (2/M) sum_p (x(n-2p-1) - x(n+2p+1)) cot(pi(2p+1)/M).
// The tolerance covers the rounding of the stored constants. It also checks
// that the transform of a frame takes (M/N)^2 + 2 busy clocks, that blocks
// come out in order, and that illegal frame lengths are refused.
module tb_dht_core;
  import dht_pkg::*;

  localparam int unsigned N    = 4;
  localparam int unsigned MMAX = 1024;
  localparam int unsigned MBW  = $clog2(MMAX + 1);
  localparam int unsigned BBW  = $clog2(MMAX / N + 1);

  logic clk = 0, rst_n = 0;
  logic m_load = 0, m_err, in_valid = 0, in_ready, out_valid, busy, done;
  logic [MBW-1:0] m_in = '0, m_cur;
  logic signed [XW-1:0] in_data = '0;
  logic [BBW-1:0] out_blk;
  logic signed [HW-1:0] out_h [N];

  int checks = 0, failures = 0;
  int busy_cycles = 0;

  dht_core #(.N(N), .MMAX(MMAX)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (busy) busy_cycles++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_frame(input int m, input int amp);
    int x [];
    real href, tol, maxdev;
    int nblocks, next_blk;
    x = new[m];
    for (int n = 0; n < m; n++) x[n] = int'($urandom_range(2 * amp)) - amp;
    // load M
    @(negedge clk); m_load = 1; m_in = MBW'(m);
    @(negedge clk); m_load = 0;
    @(negedge clk);
    check(m_cur == MBW'(m) && !m_err, $sformatf("M=%0d accepted", m));
    busy_cycles = 0;
    // stream the frame
    for (int n = 0; n < m; n++) begin
      in_valid = 1; in_data = XW'(x[n]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 0;
    tol = real'(m) / 2.0 * real'(amp) * (2.0 ** (-1.0 - real'(KFRAC))) + 1.0;
    nblocks = 0; next_blk = 0; maxdev = 0.0;
    while (1) begin
      @(posedge clk); #1;
      if (out_valid) begin
        check(int'(out_blk) == next_blk, $sformatf("M=%0d block order %0d", m, next_blk));
        for (int r = 0; r < int'(N); r++) begin
          int n;
          n = int'(out_blk) * int'(N) + r;
          href = 0.0;
          for (int p = 0; p < m / 4; p++)
            href += (x[(n - 2*p - 1 + m) % m] - x[(n + 2*p + 1) % m]) *
                    $cos(3.14159265358979 * (2*p + 1) / m) / $sin(3.14159265358979 * (2*p + 1) / m);
          href = href * 2.0 / m;
          if ((href - out_h[r]) > maxdev) maxdev = href - out_h[r];
          if ((out_h[r] - href) > maxdev) maxdev = out_h[r] - href;
          check((href - out_h[r] <= tol) && (out_h[r] - href <= tol),
                $sformatf("M=%0d h(%0d)=%0d ref %f", m, n, out_h[r], href));
        end
        next_blk++;
      end
      if (done) break;
    end
    check(next_blk == m / int'(N), $sformatf("M=%0d got %0d blocks", m, next_blk));
    check(busy_cycles == (m / int'(N)) * (m / int'(N)) + 2,
          $sformatf("M=%0d busy %0d cycles, expected %0d", m, busy_cycles, (m/int'(N))*(m/int'(N)) + 2));
    $display("M=%0d: %0d blocks, %0d transform clocks, max deviation %f", m, next_blk, busy_cycles, maxdev);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // illegal lengths are refused
    @(negedge clk); m_load = 1; m_in = MBW'(6);
    @(negedge clk); m_load = 0; #1;
    check(m_err && m_cur == MBW'(N), "M=6 refused");
    @(negedge clk); m_load = 1; m_in = '0;
    @(negedge clk); m_load = 0; #1;
    check(m_err, "M=0 refused");
    run_frame(4, 2000);
    run_frame(8, 2000);
    run_frame(12, 2000);
    run_frame(16, 2000);
    run_frame(40, 2000);
    run_frame(64, 30000);
    run_frame(256, 1000);
    run_frame(1024, 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
