// tb_dht_m_reg: checks the frame-length register: legal values are stored
// with B = M/N and the table base Q(Q-1)/2 (Q = M/4) worked out here;
// zero, non-multiples of N and values above MMAX are refused with m_err.
module tb_dht_m_reg;
  localparam int unsigned N = 8, MMAX = 256;
  localparam int unsigned MBW = $clog2(MMAX + 1), BBW = $clog2(MMAX / N + 1);
  localparam int unsigned KAW = $clog2(((MMAX / 4) * (MMAX / 4 + 1)) / 2);
  logic clk = 0, rst_n = 0, m_load = 0, m_err;
  logic [MBW-1:0] m_in = '0, m;
  logic [BBW-1:0] nblk;
  logic [KAW-1:0] kbase;
  int checks = 0, failures = 0;
  dht_m_reg #(.N(N), .MMAX(MMAX)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    int exp_m;
    repeat (2) @(posedge clk); #1;
    chk(m == MBW'(N) && nblk == 1 && kbase == KAW'(1), "reset value");
    rst_n = 1;
    exp_m = N;
    for (int t = 0; t < 300; t++) begin
      int v; bit legal;
      v = (t < 40) ? t * 8 : int'($urandom_range(MMAX + 20));
      legal = v > 0 && v <= int'(MMAX) && (v % int'(N)) == 0;
      @(negedge clk); m_load = 1; m_in = MBW'(v);
      @(negedge clk); m_load = 0; #1;
      if (legal) exp_m = v;
      chk(m_err == !legal, $sformatf("m_err for %0d", v));
      chk(int'(m) == exp_m, $sformatf("m for %0d", v));
      chk(int'(nblk) == exp_m / int'(N), "nblk");
      chk(int'(kbase) == (exp_m / 4) * (exp_m / 4 - 1) / 2, "kbase");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
