// Shared types and arithmetic helpers of the CCK-OFDM transceiver.
//
// Samples are complex Q1.14 numbers: 16-bit two's complement per rail, 14
// fractional bits, so 1.0 = 16384 and the range is [-2, 2). A QPSK phase is
// held as an integer number of quarter turns (0: 0, 1: pi/2, 2: pi, 3: 3pi/2).
// The helpers here are pure functions: rounding of a wide value to fewer
// fractional bits (round half up, which removes the DC bias of truncation)
// and saturation to 16 bits.
package cck_pkg;

  localparam int W    = 16;          // rail width
  localparam int FRAC = 14;          // fractional bits (Q1.14)
  localparam int ONE  = 1 << FRAC;   // 1.0 (default chip amplitude)

  typedef logic signed [W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef logic [1:0] qphase_t;      // QPSK phase in quarter turns

  // 8-chip polyphase complementary code: chip i carries
  //   theta_i = phi4 + i[0]*phi1 + i[1]*phi2 + i[2]*phi3 + pi*CCK_SIGN[i].
  // The sign pattern (chips 2, 3, 4 and 6 inverted) makes every codeword a
  // complementary sequence, so its spectrum-to-time transform has a peak
  // to average power ratio of exactly 2 (3 dB).
  localparam int          CCK_LEN  = 8;
  localparam logic [7:0]  CCK_SIGN = 8'b0101_1100;

  // Arithmetic right shift by sh with round-half-up, on a 64-bit value.
  function automatic logic signed [63:0] round_shift(input logic signed [63:0] v, input int sh);
    logic signed [63:0] r;
    if (sh <= 0) r = v;
    else         r = (v + (64'sd1 <<< (sh - 1))) >>> sh;
    return r;
  endfunction

  // Saturate a 64-bit value to the 16-bit rail range.
  function automatic sample_t sat16(input logic signed [63:0] v);
    sample_t r;
    if (v > 64'sd32767)       r = 16'sh7fff;
    else if (v < -64'sd32768) r = 16'sh8000;
    else                      r = sample_t'(v);
    return r;
  endfunction

  // Unit QPSK point for a phase in quarter turns, with amplitude amp.
  function automatic cplx_t qpsk_point(input qphase_t ph, input sample_t amp);
    cplx_t c;
    unique case (ph)
      2'd0: begin c.re = amp;                c.im = '0;                 end
      2'd1: begin c.re = '0;                 c.im = amp;                end
      2'd2: begin c.re = sample_t'(-amp);    c.im = '0;                 end
      default: begin c.re = '0;              c.im = sample_t'(-amp);    end
    endcase
    return c;
  endfunction

  // Multiply a complex value by e^{j*pi/2*q} (a quarter-turn rotation).
  function automatic cplx_t rot_q(input cplx_t a, input qphase_t q);
    cplx_t c;
    unique case (q)
      2'd0: c = a;
      2'd1: begin c.re = sample_t'(-a.im); c.im = a.re;              end
      2'd2: begin c.re = sample_t'(-a.re); c.im = sample_t'(-a.im);  end
      default: begin c.re = a.im;          c.im = sample_t'(-a.re);  end
    endcase
    return c;
  endfunction

  // Modified Bessel function of the first kind, order 0 (power series).
  function automatic real bessel_i0(input real x);
    real s, term;
    s = 1.0; term = 1.0;
    for (int m = 1; m < 40; m++) begin
      term = term * (x / (2.0 * real'(m))) * (x / (2.0 * real'(m)));
      s    = s + term;
    end
    return s;
  endfunction

  // Coefficient n of the channelizer prototype low-pass, length len, for
  // p paths: a Kaiser-windowed sinc with zeros every p samples (a Nyquist
  // filter, cutoff half the channel spacing), centred at c = (len-2)/2 so
  // that len-1 taps are used and the last one is zero:
  //   h(n) = sinc((n-c)/p) * I0(beta*sqrt(1-((n-c)/c)^2)) / I0(beta)
  // returned in Q1.14 (peak 1.0 = 16384). Used at elaboration only.
  function automatic sample_t proto_coef(input int n, input int len, input int p, input real beta);
    real c, u, v, sn, w;
    int  k;
    if (n > len - 2) return '0;
    c = real'(len - 2) / 2.0;
    u = (real'(n) - c) / real'(p);
    if (u == 0.0) sn = 1.0;
    else          sn = $sin(3.14159265358979323846 * u) / (3.14159265358979323846 * u);
    v = (real'(n) - c) / c;
    w = bessel_i0(beta * $sqrt(1.0 - v * v)) / bessel_i0(beta);
    k = $rtoi($floor(sn * w * 16384.0 + 0.5));
    return sample_t'(k);
  endfunction

endpackage
