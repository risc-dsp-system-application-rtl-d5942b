// fft_butterfly: radix-2 decimation-in-time butterfly.
//
// Combinational. With t = W * b (complex product, twiddle W in signed
// Q1.(TW-2) so that 1.0 = 2**(TW-2)), the outputs are
//   x = (a + t) / 2,   y = (a - t) / 2,
// each rounded down (arithmetic shift). The halving keeps every stage of an
// FFT inside W bits, so an N-point transform returns X(k)/N. The butterfly
// equations are the standard radix-2 DIT ones; the number formats and the
// per-stage halving are this design's choices.
module fft_butterfly #(
  parameter int unsigned W  = 16,
  parameter int unsigned TW = 16
) (
  input  logic signed [W-1:0]  a_re,
  input  logic signed [W-1:0]  a_im,
  input  logic signed [W-1:0]  b_re,
  input  logic signed [W-1:0]  b_im,
  input  logic signed [TW-1:0] w_re,
  input  logic signed [TW-1:0] w_im,
  output logic signed [W-1:0]  x_re,
  output logic signed [W-1:0]  x_im,
  output logic signed [W-1:0]  y_re,
  output logic signed [W-1:0]  y_im
);

  localparam int unsigned FRAC = TW - 2;
  localparam int unsigned PW   = W + TW + 1;

  logic signed [PW-1:0] pr, pi;   // W*b before scaling
  logic signed [W+1:0]  t_re, t_im, s_re, s_im, d_re, d_im;

  always_comb begin
    pr   = PW'(b_re) * PW'(w_re) - PW'(b_im) * PW'(w_im);
    pi   = PW'(b_re) * PW'(w_im) + PW'(b_im) * PW'(w_re);
    t_re = (W+2)'(pr >>> FRAC);
    t_im = (W+2)'(pi >>> FRAC);
    s_re = (W+2)'(a_re) + t_re;
    s_im = (W+2)'(a_im) + t_im;
    d_re = (W+2)'(a_re) - t_re;
    d_im = (W+2)'(a_im) - t_im;
    x_re = W'(s_re >>> 1);
    x_im = W'(s_im >>> 1);
    y_re = W'(d_re >>> 1);
    y_im = W'(d_im >>> 1);
  end

endmodule
