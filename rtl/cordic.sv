// cordic: iterative CORDIC unit with vectoring and rotation modes.
//
// Vectoring (mode CORDIC_VEC): takes (x_in, y_in) and returns
//   x_out = sqrt(x_in^2 + y_in^2), ang_out = atan2(y_in, x_in).
// Rotation (mode CORDIC_ROT): takes (x_in, y_in) and an angle ang_in and
// returns the vector rotated counter-clockwise by ang_in:
//   x_out = x cos(a) - y sin(a), y_out = x sin(a) + y cos(a).
// A first step folds the problem into the right half plane (a quarter turn
// when x < 0 in vectoring, or when |angle| > pi/2 in rotation), then CITER
// shift-and-add micro-rotations run, one per clock, and a final multiply
// removes the CORDIC gain, so results are true lengths and rotations.
// Interface: pulse start with the operands while ready is high; done pulses
// with the results CITER + 2 clocks later. The results hold until the next
// start. Formats are those of ica_pkg. The two CORDIC modes are the ones the
// source builds its FastICA from; the iterative form, the quadrant fold and
// the gain correction are this design's choice.
module cordic
  import ica_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  cordic_mode_t mode,
  input  word_t        x_in,
  input  word_t        y_in,
  input  angle_t       ang_in,
  output logic         ready,
  output logic         done,
  output word_t        x_out,
  output word_t        y_out,
  output angle_t       ang_out
);

  // Two guard bits above the data range (gain 1.65 times sqrt(2)).
  localparam int unsigned IW = CW + 3;
  localparam int unsigned KINV_FRAC = 20;
  // 1 / prod_i sqrt(1 + 2^-2i), i = 0 .. CITER-1.
  localparam int KINV = 636751;  // round(0.6072529350 * 2^20)

  localparam angle_t HALF_PI = angle_t'(1) <<< (AW - 2);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_GAIN} state_t;
  state_t state;

  cordic_mode_t md;
  logic signed [IW-1:0] x, y;
  angle_t z;
  logic [$clog2(CITER+1)-1:0] it;

  typedef angle_t atan_tab_t [CITER];
  function automatic atan_tab_t make_atan();
    atan_tab_t t;
    for (int i = 0; i < int'(CITER); i++) t[i] = atan_tab(i);
    return t;
  endfunction
  localparam atan_tab_t ATAN = make_atan();

  logic dir_pos;  // take the +atan step (y<0 in vectoring, z>=0 in rotation)
  always_comb dir_pos = (md == CORDIC_VEC) ? y[IW-1] : !z[AW-1];

  function automatic word_t gain_fix(input logic signed [IW-1:0] v);
    logic signed [IW+KINV_FRAC+1:0] p;
    p = (IW+KINV_FRAC+2)'(v) * (IW+KINV_FRAC+2)'(KINV);
    p = p + ((IW+KINV_FRAC+2)'(1) <<< (KINV_FRAC - 1));
    return word_t'(p >>> KINV_FRAC);
  endfunction

  assign ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      done    <= 1'b0;
      md      <= CORDIC_VEC;
      x       <= '0;
      y       <= '0;
      z       <= '0;
      it      <= '0;
      x_out   <= '0;
      y_out   <= '0;
      ang_out <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          md    <= mode;
          it    <= '0;
          state <= S_ITER;
          if (mode == CORDIC_VEC) begin
            if (x_in[CW-1]) begin
              // quarter-turn fold into the right half plane
              if (!y_in[CW-1]) begin
                x <= IW'(y_in);  y <= -IW'(x_in);  z <= HALF_PI;
              end else begin
                x <= -IW'(y_in); y <= IW'(x_in);   z <= -HALF_PI;
              end
            end else begin
              x <= IW'(x_in); y <= IW'(y_in); z <= '0;
            end
          end else begin
            if (ang_in > HALF_PI) begin
              x <= -IW'(y_in); y <= IW'(x_in);  z <= ang_in - HALF_PI;
            end else if (ang_in < -HALF_PI) begin
              x <= IW'(y_in);  y <= -IW'(x_in); z <= ang_in + HALF_PI;
            end else begin
              x <= IW'(x_in);  y <= IW'(y_in);  z <= ang_in;
            end
          end
        end
        S_ITER: begin
          if (dir_pos) begin
            x <= x - (y >>> it);
            y <= y + (x >>> it);
            z <= z - ATAN[it];
          end else begin
            x <= x + (y >>> it);
            y <= y - (x >>> it);
            z <= z + ATAN[it];
          end
          if (it == ($clog2(CITER+1))'(CITER - 1)) state <= S_GAIN;
          it <= it + 1'b1;
        end
        S_GAIN: begin
          x_out   <= gain_fix(x);
          y_out   <= gain_fix(y);
          ang_out <= z;
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
