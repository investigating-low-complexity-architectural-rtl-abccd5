// tb_dht_controller: for several B it records the sequence of reads the
// controller issues and checks it against the walk i = 0..B-1, j = 0..B-1
// with s = (i - j) mod B; checks kern_en one cycle after each read, the
// first/last/block tags two cycles after it, the B^2 + 2 busy clocks, the
// x_clear/done pulses, and that nothing happens without data_ready.
module tb_dht_controller;
  localparam int unsigned N = 4, MMAX = 64, BBW = $clog2(MMAX / N + 1);
  logic clk = 0, rst_n = 0, data_ready = 0;
  logic [BBW-1:0] nblk = '0;
  logic busy, done, x_clear, x_rd, k_rd, kern_en, o_first, o_last;
  logic [BBW-1:0] x_blk, k_s, o_blk;
  int checks = 0, failures = 0;
  dht_controller #(.N(N), .MMAX(MMAX)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  int rd_cyc [$], rd_j [$], rd_s [$], en_cyc [$], tag_cyc [$], tag_f [$], tag_l [$], tag_b [$];
  int cyc = 0, busy_n = 0, clear_cyc = -1, done_cyc = -1;
  always @(posedge clk) begin
    cyc++;
    if (busy) busy_n++;
    if (x_rd) begin rd_cyc.push_back(cyc); rd_j.push_back(int'(x_blk)); rd_s.push_back(int'(k_s)); end
    if (kern_en) en_cyc.push_back(cyc);
    if (o_first || o_last || kern_en) ;
    if (x_clear) clear_cyc = cyc;
    if (done) done_cyc = cyc;
  end
  // tags are sampled in the cycle when the kernel result is valid (en + 1)
  always @(posedge clk) if (en_cyc.size() > tag_cyc.size() && cyc > en_cyc[tag_cyc.size()]) begin
    tag_cyc.push_back(cyc); tag_f.push_back(o_first); tag_l.push_back(o_last); tag_b.push_back(int'(o_blk));
  end
  task automatic run(input int b);
    rd_cyc.delete(); rd_j.delete(); rd_s.delete(); en_cyc.delete();
    tag_cyc.delete(); tag_f.delete(); tag_l.delete(); tag_b.delete();
    busy_n = 0;
    @(negedge clk); nblk = BBW'(b);
    repeat (3) @(negedge clk);
    chk(!busy && rd_cyc.size() == 0, "idle without data_ready");
    data_ready = 1;
    while (clear_cyc < 0 || !done) @(negedge clk);
    data_ready = 0;
    @(negedge clk); @(negedge clk);
    chk(rd_cyc.size() == b * b, $sformatf("B=%0d reads %0d", b, rd_cyc.size()));
    chk(busy_n == b * b + 2, $sformatf("B=%0d busy %0d", b, busy_n));
    chk(done_cyc == rd_cyc[rd_cyc.size() - 1] + 3, "done timing");
    chk(clear_cyc == done_cyc - 1, "x_clear before done");
    for (int k = 0; k < rd_cyc.size() && k < b * b; k++) begin
      int i, j;
      i = k / b; j = k % b;
      chk(rd_cyc[k] == rd_cyc[0] + k, "one read per clock");
      chk(rd_j[k] == j && rd_s[k] == (i - j + b) % b, $sformatf("B=%0d read %0d", b, k));
      chk(en_cyc[k] == rd_cyc[k] + 1, "kern_en one cycle after read");
      chk(tag_f[k] == (j == 0) && tag_l[k] == (j == b - 1) && tag_b[k] == i, "tags");
    end
    clear_cyc = -1;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run(1); run(2); run(3); run(7); run(16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
