// Self-checking testbench for nmdfb_synth (64 channels, 64 x 12 matrix).
// The reference computes the composite directly from its definition in
// double precision, without any polyphase or FFT structure:
//     y[n] = 1/2 * sum_m sum_k X_k[m]/M * g[n - m*M/2] * e^{j*2*pi*k*n/M}
// and every output sample is compared with it (tolerance 6 LSB for the
// fixed-point IFFT and coefficient rounding; the largest error is
// reported). Stimulus: random frames on all channels at random input
// gaps, then a constant on channel 5 alone, after which the composite
// must be the pure tone X/M * e^{j*2*pi*5*n/M}. Also checks that each
// frame yields exactly M/2 outputs.
module tb_nmdfb_synth;
  import cck_pkg::*;
  import cck_ref_pkg::*;
  localparam int M = 64, T = 12, D = M / 2, L = M * T;
  localparam int NRAND = 30, NTONE = 30, NF = NRAND + NTONE;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;

  nmdfb_synth dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  real g [L];
  int  xr [NF][M], xi [NF][M];
  int  nout = 0;
  real maxerr = 0.0;

  initial for (int n = 0; n < L; n++) g[n] = proto(n, L, M, 7.857);

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int  n = nout;
    automatic int  mf = n / D;
    automatic real er = 0.0, ei = 0.0, e;
    for (int m = 0; m <= mf && m < NF; m++) begin
      if (n - m * D < L) begin
        for (int k = 0; k < M; k++) begin
          automatic real a = 2.0 * PI * ((k * n) % M) / M;
          automatic real c = 0.5 * g[n - m * D] / M;
          er += c * (xr[m][k] * $cos(a) - xi[m][k] * $sin(a));
          ei += c * (xr[m][k] * $sin(a) + xi[m][k] * $cos(a));
        end
      end
    end
    e = rabs(out_data.re - er) > rabs(out_data.im - ei) ? rabs(out_data.re - er) : rabs(out_data.im - ei);
    if (e > maxerr) maxerr = e;
    checks++;
    if (e > 4.0) begin
      failures++;
      if (failures < 10) $display("FAIL y[%0d] got (%0d,%0d) exp (%0.1f,%0.1f)", n, out_data.re, out_data.im, er, ei);
    end
    // pure tone once channel 5 alone has filled the filter
    if (mf >= NRAND + 2 * T) begin
      automatic real a = 2.0 * PI * ((5 * n) % M) / M;
      checks++;
      if (rabs(out_data.re - 12000.0 / M * $cos(a)) > 3.0 || rabs(out_data.im - 12000.0 / M * $sin(a)) > 3.0) begin
        failures++;
        $display("FAIL tone y[%0d] = (%0d,%0d)", n, out_data.re, out_data.im);
      end
    end
    nout++;
  end

  initial begin
    for (int m = 0; m < NF; m++)
      for (int k = 0; k < M; k++) begin
        if (m < NRAND) begin
          xr[m][k] = $urandom_range(0, 32000) - 16000;
          xi[m][k] = $urandom_range(0, 32000) - 16000;
        end else begin
          xr[m][k] = (k == 5) ? 12000 : 0;
          xi[m][k] = 0;
        end
      end
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int m = 0; m < NF; m++)
      for (int k = 0; k < M; k++) begin
        in_valid = 1;
        in_data.re = sample_t'(xr[m][k]);
        in_data.im = sample_t'(xi[m][k]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    repeat (4 * M * 6) @(posedge clk);
    checks++;
    if (nout != NF * D) begin failures++; $display("FAIL %0d outputs for %0d frames", nout, NF); end
    $display("largest error %0.2f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
