// tb_dht_x_memory: writes frames of several lengths, checks data_ready
// after exactly M samples, refusal of extra samples, and that reading block
// j returns x(N*j .. N*j+N-1) one cycle later.
module tb_dht_x_memory;
  import dht_pkg::*;
  localparam int unsigned N = 4, MMAX = 64;
  localparam int unsigned MBW = $clog2(MMAX + 1), BBW = $clog2(MMAX / N + 1);
  logic clk = 0, rst_n = 0, clear = 0, wr_valid = 0, wr_ready, data_ready, rd_en = 0;
  logic [MBW-1:0] m = '0;
  logic signed [XW-1:0] wr_data = '0;
  logic [BBW-1:0] rd_blk = '0;
  logic signed [XW-1:0] rd_x [N];
  int checks = 0, failures = 0;
  dht_x_memory #(.N(N), .MMAX(MMAX)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic frame(input int mm);
    logic signed [XW-1:0] x [MMAX];
    @(negedge clk); clear = 1; m = MBW'(mm);
    @(negedge clk); clear = 0;
    for (int n = 0; n < mm; n++) begin
      x[n] = XW'($urandom);
      chk(!data_ready && wr_ready, "not ready before the frame is full");
      wr_valid = 1; wr_data = x[n];
      @(negedge clk);
    end
    chk(data_ready && !wr_ready, "data_ready after M samples");
    wr_data = 16'sh7fff;  // refused
    @(negedge clk); wr_valid = 0;
    for (int j = mm / int'(N) - 1; j >= 0; j--) begin
      rd_en = 1; rd_blk = BBW'(j);
      @(negedge clk); rd_en = 0;
      for (int b = 0; b < int'(N); b++)
        chk(rd_x[b] == x[j * int'(N) + b], $sformatf("M=%0d x(%0d)", mm, j * int'(N) + b));
    end
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    frame(4); frame(12); frame(64); frame(32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
