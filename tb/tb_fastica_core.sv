// tb_fastica_core: self-checking test of the CORDIC-based FastICA.
//
// Builds N independent unit-variance sources (uniform, sparse, square-ish),
// mixes them with a random orthogonal matrix (so the mixtures are already
// white) and runs the core for N = 2, 3 and 4 with the X_w memory modelled
// in the bench. Checks:
//  * the result is a unit vector,
//  * it matches, sign aside, the same fixed-point iteration run in floating
//    point for the same number of updates,
//  * it lines up with one column of the mixing matrix (a source was found),
//  * a start vector drawn on chip (w_rand) is used as the start,
//  * the run converged, and each iteration used the CORDIC (N-1)(L+1) times
//    in rotation mode and N-1 times in vectoring mode.
module tb_fastica_core;
  import ica_pkg::*;

  localparam int unsigned NMAX = 8;
  localparam int unsigned LMAX = 1024;
  localparam int unsigned KBW = $clog2(NMAX);
  localparam int unsigned NBW = $clog2(NMAX + 1);
  localparam int unsigned JBW = $clog2(LMAX);
  localparam int unsigned LBW = $clog2(LMAX + 1);

  logic clk = 0, rst_n = 0;
  logic [NBW-1:0] n_sig = '0;
  logic [LBW-1:0] l_len = '0;
  logic [7:0] max_iter = 8'd40;
  word_t conv_tol = word_t'(8);
  logic w_wr = 0, w_rand = 0;
  logic [KBW-1:0] w_idx = '0;
  word_t w_data = '0;
  logic z_rd;
  logic [KBW-1:0] z_k;
  logic [JBW-1:0] z_j;
  word_t z_data;
  logic start = 0, busy, done, converged;
  logic [7:0] iters;
  word_t w_out [NMAX];

  fastica_core #(.NMAX(NMAX), .LMAX(LMAX)) dut (.*);

  always #5 clk = ~clk;

  word_t zmem [NMAX][LMAX];
  always_ff @(posedge clk) if (z_rd) z_data <= zmem[z_k][z_j];

  int checks = 0, failures = 0;
  int vec_ops = 0, rot_ops = 0;
  always @(posedge clk)
    if (dut.c_start) begin
      if (dut.c_mode == CORDIC_VEC) vec_ops++; else rot_ops++;
    end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real rnd();  // uniform in [0, 1)
    return real'($urandom) / 4294967296.0;
  endfunction

  task automatic run(input int n, input int l, input bit rnd_start);
    real s [][], a [][], z [][], wf [], wr [], g, nrm, d, best, mean, var_, q;
    int it_hw;
    s = new[n]; z = new[n]; a = new[n]; wf = new[n]; wr = new[n];
    for (int k = 0; k < n; k++) begin
      s[k] = new[l]; z[k] = new[l]; a[k] = new[n];
    end
    // sources: uniform, sparse (super-Gaussian), binary
    for (int j = 0; j < l; j++)
      for (int k = 0; k < n; k++) begin
        case (k % 3)
          0: s[k][j] = rnd() - 0.5;
          1: s[k][j] = (rnd() < 0.1) ? (rnd() - 0.5) * 8.0 : (rnd() - 0.5) * 0.2;
          default: s[k][j] = (rnd() < 0.5) ? 1.0 : -1.0;
        endcase
      end
    for (int k = 0; k < n; k++) begin
      mean = 0; var_ = 0;
      for (int j = 0; j < l; j++) mean += s[k][j];
      mean /= l;
      for (int j = 0; j < l; j++) begin s[k][j] -= mean; var_ += s[k][j] * s[k][j]; end
      var_ = $sqrt(var_ / l);
      for (int j = 0; j < l; j++) s[k][j] /= var_;
    end
    // random orthogonal mixing matrix by Gram-Schmidt
    for (int c = 0; c < n; c++) begin
      for (int r = 0; r < n; r++) a[r][c] = rnd() - 0.5;
      for (int p = 0; p < c; p++) begin
        d = 0; for (int r = 0; r < n; r++) d += a[r][c] * a[r][p];
        for (int r = 0; r < n; r++) a[r][c] -= d * a[r][p];
      end
      nrm = 0; for (int r = 0; r < n; r++) nrm += a[r][c] * a[r][c];
      nrm = $sqrt(nrm); for (int r = 0; r < n; r++) a[r][c] /= nrm;
    end
    for (int r = 0; r < n; r++)
      for (int j = 0; j < l; j++) begin
        q = 0; for (int c = 0; c < n; c++) q += a[r][c] * s[c][j];
        zmem[r][j] = word_t'($rtoi(q * (2.0 ** CFRAC)));
        z[r][j] = real'(zmem[r][j]) / (2.0 ** CFRAC);
      end
    // start vector, also written into the core
    for (int k = 0; k < n; k++) wf[k] = rnd() - 0.5;
    @(negedge clk);
    n_sig = NBW'(n); l_len = LBW'(l);
    for (int k = 0; k < n; k++) begin
      w_wr = 1; w_idx = KBW'(k); w_data = word_t'($rtoi(wf[k] * (2.0 ** CFRAC)));
      wf[k] = real'(w_data) / (2.0 ** CFRAC);
      @(negedge clk);
    end
    w_wr = 0;
    vec_ops = 0; rot_ops = 0;
    w_rand = rnd_start;
    start = 1; @(negedge clk); start = 0; w_rand = 0;
    if (rnd_start) begin
      // the core draws its own start vector: take it as the reference start
      repeat (n) @(negedge clk);
      nrm = 0;
      for (int k = 0; k < n; k++) begin
        q = real'(dut.w[k]) / (2.0 ** CFRAC);
        check(q >= -0.5 && q < 0.5, "random start value in range");
        check(real'(dut.w[k]) / (2.0 ** CFRAC) != wf[k], "random start differs from the loaded one");
        wf[k] = q;
      end
    end
    while (!done) @(negedge clk);
    it_hw = iters;
    // floating-point reference: normalise, then it_hw updates, then normalise
    nrm = 0; for (int k = 0; k < n; k++) nrm += wf[k] * wf[k];
    for (int k = 0; k < n; k++) wf[k] /= $sqrt(nrm);
    for (int it = 0; it < it_hw; it++) begin
      for (int k = 0; k < n; k++) wr[k] = 0;
      for (int j = 0; j < l; j++) begin
        g = 0; for (int k = 0; k < n; k++) g += z[k][j] * wf[k];
        for (int k = 0; k < n; k++) wr[k] += z[k][j] * g * g * g;
      end
      for (int k = 0; k < n; k++) wr[k] = wr[k] / l - 3.0 * wf[k];
      nrm = 0; for (int k = 0; k < n; k++) nrm += wr[k] * wr[k];
      for (int k = 0; k < n; k++) wf[k] = wr[k] / $sqrt(nrm);
    end
    nrm = 0; d = 0;
    for (int k = 0; k < n; k++) begin
      nrm += (real'(w_out[k]) / (2.0 ** CFRAC)) ** 2;
      d   += (real'(w_out[k]) / (2.0 ** CFRAC)) * wf[k];
    end
    best = 0;
    for (int c = 0; c < n; c++) begin
      q = 0; for (int r = 0; r < n; r++) q += (real'(w_out[r]) / (2.0 ** CFRAC)) * a[r][c];
      if (q < 0) q = -q;
      if (q > best) best = q;
    end
    $display("N=%0d L=%0d: %0d iterations, converged=%0d, |w|^2=%f, |w.w_ref|=%f, best source match %f",
             n, l, it_hw, converged, nrm, (d < 0 ? -d : d), best);
    check(converged, $sformatf("N=%0d converged", n));
    check(nrm > 0.998 && nrm < 1.002, $sformatf("N=%0d unit length", n));
    check((d < 0 ? -d : d) > 0.995, $sformatf("N=%0d matches float iteration", n));
    check(best > 0.98, $sformatf("N=%0d finds a source direction", n));
    check(vec_ops == (n - 1) * (it_hw + 1), $sformatf("N=%0d vectoring ops %0d", n, vec_ops));
    check(rot_ops == (n - 1) * (l + 1) * it_hw + (n - 1),
          $sformatf("N=%0d rotation ops %0d", n, rot_ops));
    for (int k = n; k < int'(NMAX); k++) check(w_out[k] == '0, "unused entries zero");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(2, 512, 1'b0);
    run(3, 400, 1'b0);
    run(4, 300, 1'b0);
    run(3, 400, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
