// Self-checking testbench for channel_prefilter (order 37).
// A reference model here designs the same windowed-sinc low-pass in double
// precision (cutoff 1/4 cycle per sample, Kaiser beta 5, unit DC gain),
// rounds it to Q1.14 and convolves the input with it; every output must be
// within 1 LSB of the reference and appear one clock after its input. Stimulus, with random
// gaps between samples: random complex samples, then a tone inside the
// pass band (0.1 cycle/sample), which must come out at its own amplitude
// within 1 %, then a tone in the band of the neighbouring channel
// (0.4 cycle/sample), which must be attenuated by at least 40 dB, then a
// constant, which must come out unchanged within 1 LSB (unit DC gain).
module tb_channel_prefilter;
  import cck_pkg::*;
  localparam int ORDER = 37, NT = ORDER + 1;
  localparam real PI = 3.14159265358979;
  localparam int NR = 200, NP = 200, NS = 200, NC = 60, NTOT = NR + NP + NS + NC;

  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;

  channel_prefilter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction
  function automatic real i0(input real x);
    real s = 1.0, t = 1.0;
    for (int m = 1; m < 50; m++) begin t = t * x * x / (4.0 * m * m); s += t; end
    return s;
  endfunction

  real h [NT];
  real xr [NTOT], xi [NTOT];
  int  nout = 0, last_in = 0;
  bit  last_v = 0;
  real pass_max = 0.0, stop_max = 0.0;

  initial begin
    real sum = 0.0, u, v;
    for (int n = 0; n < NT; n++) begin
      u = 0.5 * (n - ORDER / 2.0);
      v = (n - ORDER / 2.0) / (ORDER / 2.0);
      h[n] = (u == 0.0 ? 1.0 : $sin(PI * u) / (PI * u)) * i0(5.0 * $sqrt(1.0 - v * v));
      sum += h[n];
    end
    // rounded to Q1.14 as the hardware holds them
    for (int n = 0; n < NT; n++) h[n] = $rtoi(h[n] / sum * 16384.0 + (h[n] < 0.0 ? -0.5 : 0.5)) / 16384.0;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid != last_v) begin failures++; $display("FAIL out_valid timing"); end
    if (out_valid) begin
      automatic int  n = nout;
      automatic real er = 0.0, ei = 0.0;
      for (int i = 0; i < NT && i <= n; i++) begin
        er += h[i] * xr[n - i];
        ei += h[i] * xi[n - i];
      end
      checks++;
      if (rabs(out_data.re - er) > 1.0 || rabs(out_data.im - ei) > 1.0) begin
        failures++;
        if (failures < 10) $display("FAIL y[%0d] got %h exp (%0.1f,%0.1f)", n, out_data, er, ei);
      end
      if (n >= NR + NT && n < NR + NP) begin
        automatic real m = $sqrt(real'(out_data.re) ** 2 + real'(out_data.im) ** 2);
        if (m > pass_max) pass_max = m;
      end
      if (n >= NR + NP + NT && n < NR + NP + NS) begin
        automatic real m = $sqrt(real'(out_data.re) ** 2 + real'(out_data.im) ** 2);
        if (m > stop_max) stop_max = m;
      end
      if (n == NTOT - 1) begin
        checks++;
        if (rabs(out_data.re - 10000.0) > 1.0 || rabs(out_data.im + 5000.0) > 1.0) begin
          failures++;
          $display("FAIL DC gain (%0d,%0d)", out_data.re, out_data.im);
        end
      end
      nout++;
    end
    last_v = in_valid;
  end

  initial begin
    for (int n = 0; n < NTOT; n++) begin
      if (n < NR) begin
        int a, b;
        a = $urandom_range(0, 30000);
        b = $urandom_range(0, 30000);
        xr[n] = a - 15000; xi[n] = b - 15000;
      end else if (n < NR + NP) begin
        xr[n] = $rtoi(12000.0 * $cos(2.0 * PI * 0.1 * n)); xi[n] = $rtoi(12000.0 * $sin(2.0 * PI * 0.1 * n));
      end else if (n < NR + NP + NS) begin
        xr[n] = $rtoi(12000.0 * $cos(2.0 * PI * 0.4 * n)); xi[n] = $rtoi(12000.0 * $sin(2.0 * PI * 0.4 * n));
      end else begin
        xr[n] = 10000; xi[n] = -5000;
      end
    end
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NTOT; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_data.re = sample_t'($rtoi(xr[n]));
      in_data.im = sample_t'($rtoi(xi[n]));
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (nout != NTOT) begin failures++; $display("FAIL %0d outputs for %0d inputs", nout, NTOT); end
    checks++;
    if (rabs(pass_max - 12000.0) > 120.0) begin failures++; $display("FAIL pass-band amplitude %0.1f", pass_max); end
    checks++;
    if (stop_max > 120.0) begin failures++; $display("FAIL stop-band amplitude %0.1f", stop_max); end
    $display("pass band %0.1f, stop band %0.1f (input 12000)", pass_max, stop_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
