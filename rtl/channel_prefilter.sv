// Per-channel low-pass pre-filter for the analysis channelizer output.
//
// A channel leaves the M/2 analysis channelizer sampled at twice its
// spacing, so besides its own band (|f| < 1/4 of its sample rate) it
// carries the edges of the two neighbouring channels (1/4 < |f| < 1/2).
// When the neighbours arrive with a different delay these components
// distort the channel, so a short linear-phase low-pass removes them
// before demodulation.
//
// The filter is a direct-form FIR of order ORDER (ORDER+1 taps) with real
// coefficients applied to both rails: a Kaiser-windowed sinc with cutoff
// CUTOFF cycles per sample, normalised to unit gain at DC, computed at
// elaboration and rounded to Q1.14. Its delay is ORDER/2 samples.
//
// Interface: in_valid/in_data take one channel sample at a time; every
// accepted sample gives one output sample out_data, with out_valid one
// clock later. Products are summed at full precision, then rounded half up
// and saturated.
//
// Following the document: a low-pass of order 37 per channel that
// removes the adjacent-channel components, with a delay of about 18
// samples. This design's own choices: the Kaiser window design (the
// document uses an equiripple design whose coefficients are not given),
// the cutoff and the direct form.
module channel_prefilter
  import cck_pkg::*;
#(
  parameter int  ORDER  = 37,
  parameter real CUTOFF = 0.25,
  parameter real BETA   = 5.0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);
  localparam int NT = ORDER + 1;

  typedef sample_t coef_t [NT];
  function automatic coef_t make_coefs();
    coef_t c;
    real   h [NT];
    real   sum = 0.0, u, v, mid = ORDER / 2.0;
    for (int n = 0; n < NT; n++) begin
      u = 2.0 * CUTOFF * (n - mid);
      v = (n - mid) / mid;
      h[n] = (u == 0.0 ? 1.0 : $sin(3.14159265358979 * u) / (3.14159265358979 * u))
             * bessel_i0(BETA * $sqrt(1.0 - v * v));
      sum += h[n];
    end
    for (int n = 0; n < NT; n++) c[n] = sample_t'($rtoi(h[n] / sum * ONE + (h[n] < 0.0 ? -0.5 : 0.5)));
    return c;
  endfunction
  localparam coef_t H = make_coefs();

  cplx_t line [NT-1];     // previous samples, newest first

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NT - 1; i++) line[i] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        logic signed [63:0] acc_re, acc_im;
        acc_re = 64'(H[0]) * 64'(in_data.re);
        acc_im = 64'(H[0]) * 64'(in_data.im);
        for (int i = 1; i < NT; i++) begin
          acc_re += 64'(H[i]) * 64'(line[i-1].re);
          acc_im += 64'(H[i]) * 64'(line[i-1].im);
        end
        out_data.re <= sat16(round_shift(acc_re, FRAC));
        out_data.im <= sat16(round_shift(acc_im, FRAC));
        line[0] <= in_data;
        for (int i = 1; i < NT - 1; i++) line[i] <= line[i-1];
      end
    end
  end
endmodule
