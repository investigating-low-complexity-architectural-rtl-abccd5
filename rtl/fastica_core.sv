// fastica_core: reconfigurable CORDIC-based FastICA (one estimator vector).
//
// Finds an estimator vector w (unit length, n_sig entries) of maximum
// kurtosis for n_sig whitened signals z_1..z_N of l_len samples held in the
// X_w memory, by the fixed-point iteration
//   w+ = E[z (w^T z)^3] - 3 w,  w = w+ / |w+|.
// The number of signals N (2 .. NMAX) and the frame length L (1 .. LMAX)
// are run-time inputs, so one datapath serves any dimension. All
// trigonometry is done by one shared CORDIC unit:
//   Step 2  N-1 vectoring operations give the angles theta_1..theta_(N-1)
//           of w (theta_r = atan2(w_(r+1), |w_1..w_r|)).
//   Step 3  N-1 rotations of (1, 0) by theta_(N-1) .. theta_1 give the unit
//           vector w/|w| (each rotation's y output is one entry).
//   Step 4  for every sample j, N-1 rotations by -theta_r fold z_j onto w,
//           giving the projection G(j) = w^T z_j / |w| without multipliers.
//   Step 5  E[z_k G^3] is accumulated (a cube and N multiply-adds per
//           sample), divided by L and 3 w_k subtracted.
//   Step 6  after the next normalisation the new unit vector is compared
//           with the previous one; the run ends when |w_new . w_old| is
//           within conv_tol of 1 (the same direction, sign aside) or after
//           max_iter iterations.
// An iteration therefore uses the CORDIC (N-1)(L+1) times in rotation mode
// and N-1 times in vectoring mode.
//
// Interface: load the start vector with w_wr/w_idx/w_data (or set w_rand
// to draw it on chip from a 32-bit LFSR, x^32+x^22+x^2+x+1, which advances
// from run to run, one entry per clock, uniform in [-1/2, 1/2)) and the whitened
// samples into the X_w memory (zw_* ports of the enclosing design), set
// n_sig, l_len, max_iter and conv_tol, pulse start. done pulses at the end;
// w_out holds the unit estimator vector, converged whether the direction
// settled, iters the number of updates done. Entries above n_sig are zero.
//
// Steps 1-6 and the CORDIC formulation follow the source; the LFSR as the
// random source is this design's choice. Number formats,
// the angle sign convention of the rotations, the dot-product convergence
// test, the iteration limit and the sequencing are this design's choice.
// The source does not describe how several estimator vectors are kept
// apart (deflation), so each run finds one vector from the given start.
module fastica_core
  import ica_pkg::*;
#(
  parameter int unsigned NMAX = 8,
  parameter int unsigned LMAX = 1024,
  localparam int unsigned KBW = $clog2(NMAX),
  localparam int unsigned NBW = $clog2(NMAX + 1),
  localparam int unsigned JBW = $clog2(LMAX),
  localparam int unsigned LBW = $clog2(LMAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // configuration
  input  logic [NBW-1:0] n_sig,
  input  logic [LBW-1:0] l_len,
  input  logic [7:0]     max_iter,
  input  word_t          conv_tol,
  // start vector (step 1): loaded, or drawn on chip when w_rand is set
  input  logic           w_rand,
  input  logic           w_wr,
  input  logic [KBW-1:0] w_idx,
  input  word_t          w_data,
  // X_w memory read port
  output logic           z_rd,
  output logic [KBW-1:0] z_k,
  output logic [JBW-1:0] z_j,
  input  word_t          z_data,
  // control and results
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           converged,
  output logic [7:0]     iters,
  output word_t          w_out [NMAX]
);

  typedef enum logic [3:0] {
    S_IDLE, S_RND, S_VEC, S_VEC_W, S_NRM, S_NRM_W, S_DOT, S_COL, S_PRJ, S_PRJ_W,
    S_CUBE, S_MAC, S_DIV, S_DIV_W, S_FIN
  } state_t;
  state_t state;

  word_t  w     [NMAX];   // current (unnormalised) estimate
  word_t  wn    [NMAX];   // its unit vector
  word_t  wprev [NMAX];   // unit vector of the previous iteration
  word_t  zcol  [NMAX];   // samples z_1..z_N at column j
  angle_t theta [NMAX];   // theta_1 .. theta_(N-1) at index 1 .. N-1
  logic signed [ACCW-1:0] acc [NMAX];

  logic [NBW-1:0] r;      // CORDIC step / vector index
  logic [JBW:0]   j;
  word_t          a;      // running CORDIC result
  logic signed [2*CW-1:0] g3;
  logic signed [ACCW-1:0] dot;
  logic           first_it;
  logic [31:0]    lfsr;   // random start values (step 1)

  // CORDIC
  logic         c_start, c_ready, c_done;
  cordic_mode_t c_mode;
  word_t        c_x, c_y, c_xo, c_yo;
  angle_t       c_ang, c_ango;

  cordic u_cordic (
    .clk, .rst_n, .start(c_start), .mode(c_mode), .x_in(c_x), .y_in(c_y),
    .ang_in(c_ang), .ready(c_ready), .done(c_done), .x_out(c_xo),
    .y_out(c_yo), .ang_out(c_ango));

  // Divider for the sample means
  logic d_start, d_ready, d_done;
  logic signed [ACCW-1:0] d_quo;
  seq_divider #(.NW(ACCW), .DW(LBW)) u_div (
    .clk, .rst_n, .start(d_start), .num(acc[r[KBW-1:0]]), .den(l_len),
    .ready(d_ready), .done(d_done), .quo(d_quo));

  // CORDIC operand selection
  always_comb begin
    c_mode = CORDIC_ROT;
    c_x    = a;
    c_y    = '0;
    c_ang  = '0;
    c_start = 1'b0;
    unique case (state)
      S_VEC: begin
        c_start = 1'b1;
        c_mode  = CORDIC_VEC;
        c_x     = (r == NBW'(1)) ? w[0] : a;
        c_y     = w[r[KBW-1:0]];
      end
      S_NRM: begin
        c_start = 1'b1;
        c_x     = (r == n_sig - 1'b1) ? ONE : a;
        c_ang   = theta[r[KBW-1:0]];
      end
      S_PRJ: begin
        c_start = 1'b1;
        c_x     = (r == NBW'(1)) ? zcol[0] : a;
        c_y     = zcol[r[KBW-1:0]];
        c_ang   = -theta[r[KBW-1:0]];
      end
      default: ;
    endcase
  end

  assign d_start = (state == S_DIV);
  assign busy    = (state != S_IDLE);

  // X_w reads: one signal per cycle, issued in S_COL for k = r
  assign z_rd = (state == S_COL) && (r < n_sig);
  assign z_k  = r[KBW-1:0];
  assign z_j  = j[JBW-1:0];

  // Saturate a wide value to a data word.
  function automatic word_t sat(input logic signed [ACCW-1:0] v);
    localparam logic signed [ACCW-1:0] MAXV = ACCW'({1'b0, {(CW-1){1'b1}}});
    localparam logic signed [ACCW-1:0] MINV = -MAXV - 1;
    if (v > MAXV) return word_t'(MAXV);
    if (v < MINV) return word_t'(MINV);
    return word_t'(v);
  endfunction

  // G^3 in CFRAC format from G = a.
  function automatic logic signed [2*CW-1:0] cube(input word_t g);
    logic signed [2*CW-1:0] g2;
    logic signed [3*CW-1:0] p;
    g2 = (2*CW)'(g) * (2*CW)'(g);
    g2 = g2 >>> CFRAC;
    p  = (3*CW)'(g2) * (3*CW)'(g);
    return (2*CW)'(p >>> CFRAC);
  endfunction

  logic signed [ACCW-1:0] absdot;
  always_comb absdot = dot[ACCW-1] ? -dot : dot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      converged <= 1'b0;
      iters     <= '0;
      r         <= '0;
      j         <= '0;
      a         <= '0;
      g3        <= '0;
      dot       <= '0;
      first_it  <= 1'b1;
      lfsr      <= 32'hACE1_2468;
      for (int k = 0; k < int'(NMAX); k++) begin
        w[k] <= '0; wn[k] <= '0; wprev[k] <= '0; zcol[k] <= '0;
        theta[k] <= '0; acc[k] <= '0; w_out[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (w_wr) w[w_idx] <= w_data;
          if (start) begin
            state     <= w_rand ? S_RND : S_VEC;
            r         <= w_rand ? '0 : NBW'(1);
            iters     <= '0;
            first_it  <= 1'b1;
            converged <= 1'b0;
          end
        end
        // Step 1: one pseudo-random entry per clock, uniform in [-1/2, 1/2)
        S_RND: begin
          w[r[KBW-1:0]] <= word_t'($signed(lfsr[CFRAC-1:0]));
          lfsr <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
          if (r == n_sig - 1'b1) begin
            r     <= NBW'(1);
            state <= S_VEC;
          end else begin
            r <= r + 1'b1;
          end
        end
        // Step 2: angles of w
        S_VEC: state <= S_VEC_W;
        S_VEC_W: if (c_done) begin
          theta[r[KBW-1:0]] <= c_ango;
          a <= c_xo;
          if (r == n_sig - 1'b1) begin
            state <= S_NRM;
          end else begin
            r     <= r + 1'b1;
            state <= S_VEC;
          end
        end
        // Step 3: unit vector from the angles
        S_NRM: state <= S_NRM_W;
        S_NRM_W: if (c_done) begin
          wn[r[KBW-1:0]] <= c_yo;
          a <= c_xo;
          if (r == NBW'(1)) begin
            wn[0] <= c_xo;
            state <= S_DOT;
            r     <= '0;
            dot   <= '0;
          end else begin
            r     <= r - 1'b1;
            state <= S_NRM;
          end
        end
        // Step 6: compare with the previous direction
        S_DOT: begin
          if (r < n_sig) begin
            dot <= dot + ((ACCW'(wn[r[KBW-1:0]]) * ACCW'(wprev[r[KBW-1:0]])) >>> CFRAC);
            r   <= r + 1'b1;
          end else begin
            if (!first_it && (ACCW'(ONE) - absdot <= ACCW'(conv_tol))) begin
              converged <= 1'b1;
              state     <= S_FIN;
            end else if (iters == max_iter) begin
              state <= S_FIN;
            end else begin
              state <= S_COL;
              r     <= '0;
              j     <= '0;
              for (int k = 0; k < int'(NMAX); k++) acc[k] <= '0;
            end
          end
        end
        // Step 4: fetch column j of X_w, then project it onto w
        S_COL: begin
          if (r != '0 && r <= n_sig) zcol[r[KBW-1:0] - 1'b1] <= z_data;
          if (r == n_sig) begin
            r     <= NBW'(1);
            state <= S_PRJ;
          end else begin
            r <= r + 1'b1;
          end
        end
        S_PRJ: state <= S_PRJ_W;
        S_PRJ_W: if (c_done) begin
          a <= c_xo;
          if (r == n_sig - 1'b1) begin
            state <= S_CUBE;
          end else begin
            r     <= r + 1'b1;
            state <= S_PRJ;
          end
        end
        // Step 5: accumulate z_k G^3
        S_CUBE: begin
          g3    <= cube(a);
          r     <= '0;
          state <= S_MAC;
        end
        S_MAC: begin
          acc[r[KBW-1:0]] <= acc[r[KBW-1:0]] +
              ACCW'(((3*CW)'(zcol[r[KBW-1:0]]) * (3*CW)'(g3)) >>> CFRAC);
          if (r == n_sig - 1'b1) begin
            r <= '0;
            if (j == (JBW+1)'(l_len - 1'b1)) begin
              state <= S_DIV;
            end else begin
              j     <= j + 1'b1;
              state <= S_COL;
            end
          end else begin
            r <= r + 1'b1;
          end
        end
        // Step 5: mean over L, minus 3 w
        S_DIV: state <= S_DIV_W;
        S_DIV_W: if (d_done) begin
          w[r[KBW-1:0]] <= sat(d_quo - 3 * ACCW'(wn[r[KBW-1:0]]));
          if (r == n_sig - 1'b1) begin
            for (int k = 0; k < int'(NMAX); k++) wprev[k] <= wn[k];
            first_it <= 1'b0;
            iters    <= iters + 1'b1;
            r        <= NBW'(1);
            state    <= S_VEC;
          end else begin
            r     <= r + 1'b1;
            state <= S_DIV;
          end
        end
        S_FIN: begin
          for (int k = 0; k < int'(NMAX); k++)
            w_out[k] <= (k < int'(n_sig)) ? wn[k] : '0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The CORDIC and the divider are only started when idle.
  assert property (@(posedge clk) disable iff (!rst_n) c_start |-> c_ready);
  assert property (@(posedge clk) disable iff (!rst_n) d_start |-> d_ready);

endmodule
