// dht_controller: sequencer of the reconfigurable DHT.
//
// When the X memory reports a complete frame (data_ready) the controller
// runs the B^2 kernel uses of an M-point transform, B = M/N, one per clock:
// for each output block i = 0 .. B-1 it walks the input blocks
// j = 0 .. B-1, reading X_j from the X memory (control1: x_rd, x_blk) and
// the constants of sub-matrix K_s, s = (i - j) mod B, from the K memory
// (control2: k_rd, k_s). Both memories answer one cycle later, when the
// kernel is enabled (control4: kern_en); the kernel result appears one
// cycle after that, when the output stage is told whether it is the first
// or last term of block i (control3: o_first, o_last, o_blk). After the
// last result the controller clears the X memory (x_clear, in the cycle
// before done) and pulses done. The walk order and these control groups follow the source's
// block diagram; the exact pipeline alignment is this design's choice.
// Timing: done comes B^2 + 2 cycles after the first kernel read, in the
// same cycle as the output stage presents the last block.
module dht_controller #(
  parameter int unsigned N    = 4,
  parameter int unsigned MMAX = 1024,
  localparam int unsigned BBW = $clog2(MMAX / N + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [BBW-1:0] nblk,       // B = M/N
  input  logic           data_ready,
  output logic           busy,
  output logic           done,
  output logic           x_clear,
  // control1: X memory
  output logic           x_rd,
  output logic [BBW-1:0] x_blk,
  // control2: K memory
  output logic           k_rd,
  output logic [BBW-1:0] k_s,
  // control4: kernel
  output logic           kern_en,
  // control3: output stage
  output logic           o_first,
  output logic           o_last,
  output logic [BBW-1:0] o_blk
);

  typedef enum logic [1:0] {IDLE, RUN, DRAIN, FINISH} state_t;
  state_t state;

  logic [BBW-1:0] i_cnt, j_cnt, s_cnt;
  logic           issue;

  // Pipeline copies of the tags that travel with a kernel use.
  logic           v1, f1, l1;
  logic [BBW-1:0] b1;

  assign issue = (state == RUN);
  assign busy  = (state != IDLE);
  assign x_rd  = issue;
  assign k_rd  = issue;
  assign x_blk = j_cnt;
  assign k_s   = s_cnt;
  assign kern_en = v1;
  assign x_clear = (state == FINISH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      i_cnt     <= '0;
      j_cnt     <= '0;
      s_cnt     <= '0;
      done      <= 1'b0;
    end else begin
      done    <= 1'b0;
      unique case (state)
        IDLE: if (data_ready) begin
          state <= RUN;
          i_cnt <= '0;
          j_cnt <= '0;
          s_cnt <= '0;
        end
        RUN: begin
          if (j_cnt == nblk - 1'b1) begin
            j_cnt <= '0;
            s_cnt <= i_cnt + 1'b1;        // (i+1 - 0) mod B
            if (i_cnt == nblk - 1'b1) begin
              state     <= DRAIN;
            end else begin
              i_cnt <= i_cnt + 1'b1;
            end
          end else begin
            j_cnt <= j_cnt + 1'b1;
            s_cnt <= (s_cnt == '0) ? nblk - 1'b1 : s_cnt - 1'b1;
          end
        end
        DRAIN: begin
          state <= FINISH;
        end
        FINISH: begin
          done    <= 1'b1;
          state   <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0; b1 <= '0;
      o_first <= 1'b0; o_last <= 1'b0; o_blk <= '0;
    end else begin
      v1 <= issue;
      f1 <= issue && (j_cnt == '0);
      l1 <= issue && (j_cnt == nblk - 1'b1);
      b1 <= i_cnt;
      o_first <= f1;
      o_last  <= l1;
      o_blk   <= b1;
    end
  end


endmodule
