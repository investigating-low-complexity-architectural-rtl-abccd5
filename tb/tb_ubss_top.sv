// tb_ubss_top: end-to-end test of ubss_top at its default sizes.
//
// DHT part: transforms frames of several lengths M (reconfiguration between
// frames), including the largest, M = 1024, checks every output against the
// defining sum in floating point and the (M/N)^2 + 2 clock transform time,
// tries an illegal M, and pushes samples while the frame buffer is full.
// FastICA part: loads whitened mixtures of independent sources through the
// X_w memory port, runs with N = 2, then N = 8 signals of L = 1024 samples
// (reconfiguration of the dimension; the first run draws its start vector
// on chip), and once with a zero tolerance and a
// small iteration limit so that the limit ends the run. Results must be
// unit vectors aligned with a source direction.
// Each mechanism is counted and a failure is recorded for one never seen.
module tb_ubss_top;
  import dht_pkg::*;
  import ica_pkg::*;

  localparam int unsigned N_DHT = 4, DHT_MMAX = 1024, ICA_NMAX = 8, ICA_LMAX = 1024;
  localparam int unsigned MBW = $clog2(DHT_MMAX + 1);
  localparam int unsigned BBW = $clog2(DHT_MMAX / N_DHT + 1);
  localparam int unsigned KBW = $clog2(ICA_NMAX);
  localparam int unsigned NBW = $clog2(ICA_NMAX + 1);
  localparam int unsigned JBW = $clog2(ICA_LMAX);
  localparam int unsigned LBW = $clog2(ICA_LMAX + 1);

  logic clk = 0, rst_n = 0;
  logic dht_m_load = 0, dht_m_err, dht_in_valid = 0, dht_in_ready;
  logic [MBW-1:0] dht_m_in = '0, dht_m_cur;
  logic signed [XW-1:0] dht_in_data = '0;
  logic dht_out_valid, dht_busy, dht_done;
  logic [BBW-1:0] dht_out_blk;
  logic signed [HW-1:0] dht_out_h [N_DHT];
  logic ica_z_wr = 0;
  logic [KBW-1:0] ica_z_wr_k = '0;
  logic [JBW-1:0] ica_z_wr_j = '0;
  word_t ica_z_wr_data = '0;
  logic [NBW-1:0] ica_n_sig = '0;
  logic [LBW-1:0] ica_l_len = '0;
  logic [7:0] ica_max_iter = 8'd40;
  word_t ica_conv_tol = word_t'(8);
  logic ica_w_wr = 0, ica_w_rand = 0;
  logic [KBW-1:0] ica_w_idx = '0;
  word_t ica_w_data = '0;
  logic ica_start = 0, ica_busy, ica_done, ica_converged;
  logic [7:0] ica_iters;
  word_t ica_w_out [ICA_NMAX];

  ubss_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_frames = 0, n_reconfig = 0, n_m_refused = 0, n_backpressure = 0;
  int n_ica_converged = 0, n_ica_limit = 0, n_ica_dims = 0, n_ica_random = 0;
  int busy_cycles = 0;
  always @(posedge clk) if (dht_busy) busy_cycles++;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real rnd();
    return real'($urandom) / 4294967296.0;
  endfunction

  // ---------------- DHT ----------------
  task automatic dht_frame(input int m, input int amp);
    int x [];
    real href, tol;
    int next_blk, prev_m;
    x = new[m];
    for (int n = 0; n < m; n++) x[n] = int'($urandom_range(2 * amp)) - amp;
    prev_m = int'(dht_m_cur);
    @(negedge clk); dht_m_load = 1; dht_m_in = MBW'(m);
    @(negedge clk); dht_m_load = 0;
    @(negedge clk);
    check(int'(dht_m_cur) == m, $sformatf("M=%0d loaded", m));
    if (prev_m != m) n_reconfig++;
    busy_cycles = 0;
    for (int n = 0; n < m; n++) begin
      dht_in_valid = 1; dht_in_data = XW'(x[n]);
      @(posedge clk); #1;
    end
    // one extra sample offered while the buffer is full: must be refused
    dht_in_data = 16'sd1234;
    if (!dht_in_ready) n_backpressure++;
    @(posedge clk); #1;
    dht_in_valid = 0;
    tol = real'(m) / 2.0 * real'(amp) * (2.0 ** (-1.0 - real'(KFRAC))) + 1.0;
    next_blk = 0;
    while (!dht_done) begin
      @(posedge clk); #1;
      if (dht_out_valid) begin
        for (int r = 0; r < int'(N_DHT); r++) begin
          int n;
          n = int'(dht_out_blk) * int'(N_DHT) + r;
          href = 0.0;
          for (int p = 0; p < m / 4; p++)
            href += (x[(n - 2*p - 1 + m) % m] - x[(n + 2*p + 1) % m]) /
                    $tan(3.14159265358979 * (2*p + 1) / m);
          href = href * 2.0 / m;
          check((href - dht_out_h[r] <= tol) && (dht_out_h[r] - href <= tol),
                $sformatf("M=%0d h(%0d)=%0d ref %f", m, n, dht_out_h[r], href));
        end
        check(int'(dht_out_blk) == next_blk, "block order");
        next_blk++;
      end
    end
    check(next_blk == m / int'(N_DHT), $sformatf("M=%0d block count", m));
    check(busy_cycles == (m / int'(N_DHT)) ** 2 + 2, $sformatf("M=%0d clocks %0d", m, busy_cycles));
    n_frames++;
    $display("DHT M=%0d: %0d blocks in %0d clocks", m, next_blk, busy_cycles);
  endtask

  // ---------------- FastICA ----------------
  task automatic ica_run(input int n, input int l, input int lim, input int tolv,
                         input bit expect_conv, input bit rnd_start);
    real s [][], a [][], nrm, d, best, mean, sd, q;
    s = new[n]; a = new[n];
    for (int k = 0; k < n; k++) begin s[k] = new[l]; a[k] = new[n]; end
    for (int j = 0; j < l; j++)
      for (int k = 0; k < n; k++)
        case (k % 3)
          0: s[k][j] = rnd() - 0.5;
          1: s[k][j] = (rnd() < 0.1) ? (rnd() - 0.5) * 8.0 : (rnd() - 0.5) * 0.2;
          default: s[k][j] = (rnd() < 0.5) ? 1.0 : -1.0;
        endcase
    for (int k = 0; k < n; k++) begin
      mean = 0; sd = 0;
      for (int j = 0; j < l; j++) mean += s[k][j];
      mean /= l;
      for (int j = 0; j < l; j++) begin s[k][j] -= mean; sd += s[k][j] ** 2; end
      sd = $sqrt(sd / l);
      for (int j = 0; j < l; j++) s[k][j] /= sd;
    end
    for (int c = 0; c < n; c++) begin
      for (int r = 0; r < n; r++) a[r][c] = rnd() - 0.5;
      for (int p = 0; p < c; p++) begin
        d = 0; for (int r = 0; r < n; r++) d += a[r][c] * a[r][p];
        for (int r = 0; r < n; r++) a[r][c] -= d * a[r][p];
      end
      nrm = 0; for (int r = 0; r < n; r++) nrm += a[r][c] ** 2;
      for (int r = 0; r < n; r++) a[r][c] /= $sqrt(nrm);
    end
    @(negedge clk);
    for (int r = 0; r < n; r++)
      for (int j = 0; j < l; j++) begin
        q = 0; for (int c = 0; c < n; c++) q += a[r][c] * s[c][j];
        ica_z_wr = 1; ica_z_wr_k = KBW'(r); ica_z_wr_j = JBW'(j);
        ica_z_wr_data = word_t'($rtoi(q * (2.0 ** CFRAC)));
        @(negedge clk);
      end
    ica_z_wr = 0;
    for (int k = 0; k < n; k++) begin
      ica_w_wr = 1; ica_w_idx = KBW'(k); ica_w_data = word_t'($rtoi((rnd() - 0.5) * (2.0 ** CFRAC)));
      @(negedge clk);
    end
    ica_w_wr = 0;
    ica_n_sig = NBW'(n); ica_l_len = LBW'(l);
    ica_max_iter = 8'(lim); ica_conv_tol = word_t'(tolv);
    ica_w_rand = rnd_start;
    ica_start = 1; @(negedge clk); ica_start = 0; ica_w_rand = 0;
    if (rnd_start) n_ica_random++;
    while (!ica_done) @(negedge clk);
    nrm = 0;
    for (int k = 0; k < n; k++) nrm += (real'(ica_w_out[k]) / (2.0 ** CFRAC)) ** 2;
    best = 0;
    for (int c = 0; c < n; c++) begin
      q = 0; for (int r = 0; r < n; r++) q += (real'(ica_w_out[r]) / (2.0 ** CFRAC)) * a[r][c];
      if (q < 0) q = -q;
      if (q > best) best = q;
    end
    $display("ICA N=%0d L=%0d: %0d iterations, converged=%0d, |w|^2=%f, source match %f",
             n, l, ica_iters, ica_converged, nrm, best);
    check(nrm > 0.998 && nrm < 1.002, "ICA unit length");
    check(ica_converged == expect_conv, "ICA convergence flag");
    if (expect_conv) begin
      check(best > 0.97, "ICA finds a source");
      n_ica_converged++;
    end else begin
      check(int'(ica_iters) == lim, "ICA stops at the iteration limit");
      n_ica_limit++;
    end
    n_ica_dims++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); dht_m_load = 1; dht_m_in = MBW'(10);
    @(negedge clk); dht_m_load = 0; #1;
    if (dht_m_err) n_m_refused++;
    check(dht_m_err, "M=10 refused");
    fork
      begin
        dht_frame(16, 3000);
        dht_frame(100, 3000);
        dht_frame(1024, 1000);
        dht_frame(1024, 1000);
      end
      begin
        ica_run(2, 512, 40, 8, 1'b1, 1'b1);
        ica_run(8, 1024, 60, 8, 1'b1, 1'b0);
        ica_run(3, 256, 2, 0, 1'b0, 1'b0);
      end
    join
    $display("mechanisms: frames=%0d reconfig=%0d m_refused=%0d backpressure=%0d ica_converged=%0d ica_limit=%0d ica_runs=%0d ica_random_start=%0d",
             n_frames, n_reconfig, n_m_refused, n_backpressure, n_ica_converged, n_ica_limit, n_ica_dims, n_ica_random);
    check(n_frames > 0, "DHT frames seen");
    check(n_reconfig > 1, "DHT frame-length change seen");
    check(n_m_refused > 0, "illegal M refusal seen");
    check(n_backpressure > 0, "input back-pressure seen");
    check(n_ica_converged > 0, "ICA convergence seen");
    check(n_ica_limit > 0, "ICA iteration limit seen");
    check(n_ica_dims > 1, "ICA dimension change seen");
    check(n_ica_random > 0, "ICA on-chip random start seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
