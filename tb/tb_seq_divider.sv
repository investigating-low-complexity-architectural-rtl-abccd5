// tb_seq_divider: random signed dividends and unsigned divisors; the quotient
// must equal truncating division computed here, NW + 2 clocks after start.
module tb_seq_divider;
  localparam int unsigned NW = 64, DW = 11;
  logic clk = 0, rst_n = 0, start = 0, ready, done;
  logic signed [NW-1:0] num = '0, quo;
  logic [DW-1:0] den = '1;
  int checks = 0, failures = 0;
  seq_divider #(.NW(NW), .DW(DW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      int lat;
      longint e;
      @(negedge clk);
      num = {$urandom, $urandom} >>> $urandom_range(40);
      den = DW'($urandom_range(1, (1 << DW) - 1));
      e = num / longint'({53'd0, den});
      start = 1; @(negedge clk); start = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks += 2;
      if (quo != e) begin failures++; $display("FAIL %0d / %0d = %0d, got %0d", num, den, e, quo); end
      if (lat != int'(NW) + 2) begin failures++; $display("FAIL latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
