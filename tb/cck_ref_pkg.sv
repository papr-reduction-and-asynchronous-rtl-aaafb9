// Reference model for the CCK-OFDM testbenches, in real arithmetic.
// Builds the expected baseband of one frame: preamble symbol (QPSK on the
// even bins, phase m*(m+1)/2 for bin 2m) and data symbols whose bins are
// the frequency interleave of M = N/8 CCK codewords, each symbol the IDFT
// (with 1/N) of its bins, preceded by its last N/4 samples.
// Also the filter-bank prototype in double precision (Kaiser-windowed
// sinc, cutoff at half the channel spacing, last tap zero) for the
// channelizer testbenches.
package cck_ref_pkg;
  localparam int SIGNS [8] = '{0, 0, 1, 1, 1, 0, 1, 0};
  localparam real PI = 3.14159265358979323846;

  // phase (quarter turns) of chip i of the codeword with phases ph[0..3]
  function automatic int chip_phase(input int ph [4], input int i);
    return (ph[3] + (i % 2) * ph[0] + ((i / 2) % 2) * ph[1] + (i / 4) * ph[2] + 2 * SIGNS[i]) % 4;
  endfunction

  // bins of a data symbol: codes[r][0..3] are the phases of codeword r
  function automatic void data_bins(input int n, input int codes [][4], input real amp,
                                    output real br [], output real bi []);
    int m = n / 8;
    br = new[n]; bi = new[n];
    for (int k = 0; k < n; k++) begin
      br[k] = 0; bi[k] = 0;
      for (int r = 0; r < m; r++) begin
        real a = PI / 2.0 * chip_phase(codes[r], k % 8) - 2.0 * PI * ((k * r) % n) / n;
        br[k] += amp * $cos(a) / m;
        bi[k] += amp * $sin(a) / m;
      end
    end
  endfunction

  function automatic void preamble_bins(input int n, input real amp, output real br [], output real bi []);
    br = new[n]; bi = new[n];
    for (int k = 0; k < n; k++) begin
      int m = k / 2;
      br[k] = 0; bi[k] = 0;
      if (k % 2 == 0 && k != 0) begin
        br[k] = amp * $cos(PI / 2.0 * ((m * (m + 1) / 2) % 4));
        bi[k] = amp * $sin(PI / 2.0 * ((m * (m + 1) / 2) % 4));
      end
    end
  endfunction

  // IDFT with 1/N, then cyclic prefix of N/4: N + N/4 samples
  function automatic void symbol(input int n, input real br [], input real bi [],
                                 output real xr [], output real xi []);
    real tr [], ti [];
    tr = new[n]; ti = new[n];
    for (int t = 0; t < n; t++) begin
      tr[t] = 0; ti[t] = 0;
      for (int k = 0; k < n; k++) begin
        real a = 2.0 * PI * ((k * t) % n) / n;
        tr[t] += (br[k] * $cos(a) - bi[k] * $sin(a)) / n;
        ti[t] += (br[k] * $sin(a) + bi[k] * $cos(a)) / n;
      end
    end
    xr = new[n + n / 4]; xi = new[n + n / 4];
    for (int t = 0; t < n + n / 4; t++) begin
      xr[t] = tr[(t + n - n / 4) % n];
      xi[t] = ti[(t + n - n / 4) % n];
    end
  endfunction

  function automatic real i0(input real x);
    real s = 1.0, t = 1.0;
    for (int m = 1; m < 50; m++) begin t = t * x * x / (4.0 * m * m); s += t; end
    return s;
  endfunction

  // tap n of a len-tap prototype for p channels, Kaiser parameter beta
  function automatic real proto(input int n, input int len, input int p, input real beta);
    real c = (len - 2) / 2.0, u, v;
    if (n >= len - 1) return 0.0;
    u = (n - c) / p;
    v = (n - c) / c;
    return (u == 0.0 ? 1.0 : $sin(PI * u) / (PI * u)) * i0(beta * $sqrt(1.0 - v * v)) / i0(beta);
  endfunction
endpackage
