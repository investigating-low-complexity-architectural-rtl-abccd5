// seq_divider: sequential signed-by-unsigned integer divider.
//
// Computes quo = num / den (truncated toward zero) for a signed NW-bit
// dividend and an unsigned DW-bit non-zero divisor, one quotient bit per
// clock by restoring division of the magnitude. Pulse start while ready is
// high; done pulses NW + 2 clocks later with quo valid until the next start.
// Used to form the sample means E[.] of the FastICA update (division by
// the frame length L).
module seq_divider #(
  parameter int unsigned NW = 64,
  parameter int unsigned DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [NW-1:0] num,
  input  logic [DW-1:0]        den,
  output logic                 ready,
  output logic                 done,
  output logic signed [NW-1:0] quo
);

  logic [NW-1:0] q, dvd;
  logic [DW-1:0] rem;
  logic [DW-1:0] dv;
  logic          neg, run;
  logic [$clog2(NW+1)-1:0] cnt;
  logic [DW+1:0] trial;

  assign ready = !run;
  always_comb trial = {1'b0, rem, dvd[NW-1]} - {2'b0, dv};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; done <= 1'b0; q <= '0; dvd <= '0; rem <= '0;
      dv <= '0; neg <= 1'b0; cnt <= '0; quo <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run <= 1'b1;
          neg <= num[NW-1];
          dvd <= num[NW-1] ? NW'(-num) : NW'(num);
          dv  <= den;
          rem <= '0;
          q   <= '0;
          cnt <= '0;
        end
      end else if (cnt == ($clog2(NW+1))'(NW)) begin
        quo  <= neg ? -$signed(q) : $signed(q);
        done <= 1'b1;
        run  <= 1'b0;
      end else begin
        if (!trial[DW+1]) begin
          rem <= trial[DW-1:0];
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= {rem[DW-2:0], dvd[NW-1]};  // below dv, so it fits
          q   <= {q[NW-2:0], 1'b0};
        end
        dvd <= dvd << 1;
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
