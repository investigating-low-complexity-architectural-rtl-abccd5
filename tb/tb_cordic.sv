// tb_cordic: random vectors in all four quadrants. Vectoring must return
// sqrt(x^2+y^2) and atan2(y, x); rotation by a random angle in [-pi, pi)
// must return the rotated vector, all compared with real arithmetic, and
// done must come CITER + 2 clocks after start.
module tb_cordic;
  import ica_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, ready, done;
  cordic_mode_t mode = CORDIC_VEC;
  word_t x_in = '0, y_in = '0, x_out, y_out;
  angle_t ang_in = '0, ang_out;
  int checks = 0, failures = 0;
  cordic dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam real PI = 3.14159265358979;
  localparam real SC = 2.0 ** CFRAC;
  localparam real AS = PI / (2.0 ** (AW - 1));
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic op(input cordic_mode_t md, input real x, input real y, input real a,
                    output real xo, output real yo, output real ao);
    int lat;
    @(negedge clk);
    chk(ready, "ready when idle");
    mode = md; x_in = word_t'($rtoi(x * SC)); y_in = word_t'($rtoi(y * SC));
    ang_in = angle_t'($rtoi(a / AS));
    start = 1; @(negedge clk); start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    chk(lat == int'(CITER) + 2, $sformatf("latency %0d", lat));
    xo = real'(x_out) / SC; yo = real'(y_out) / SC; ao = real'(ang_out) * AS;
  endtask
  initial begin
    real x, y, a, xo, yo, ao, e, da;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      x = (real'($urandom) / 4294967296.0 - 0.5) * 100.0;
      y = (real'($urandom) / 4294967296.0 - 0.5) * 100.0;
      if (t < 4) begin x = (t % 2) ? -3.0 : 3.0; y = (t / 2) ? -4.0 : 4.0; end
      op(CORDIC_VEC, x, y, 0.0, xo, yo, ao);
      e = $sqrt(x * x + y * y);
      chk(xo - e < 1e-3 * e + 1e-3 && e - xo < 1e-3 * e + 1e-3, $sformatf("mag %f %f", xo, e));
      da = ao - $atan2(y, x);
      if (da > PI) da -= 2 * PI;
      if (da < -PI) da += 2 * PI;
      chk(da < 1e-4 && da > -1e-4, $sformatf("angle %f %f", ao, $atan2(y, x)));
      a = (real'($urandom) / 4294967296.0 - 0.5) * 2.0 * PI;
      op(CORDIC_ROT, x, y, a, xo, yo, ao);
      e = x * $cos(a) - y * $sin(a);
      chk(xo - e < 2e-3 && e - xo < 2e-3, $sformatf("rot x %f %f", xo, e));
      e = x * $sin(a) + y * $cos(a);
      chk(yo - e < 2e-3 && e - yo < 2e-3, $sformatf("rot y %f %f", yo, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
