// Self-checking testbench for nmdfb_analysis (64 channels, 64 x 12 matrix).
// The reference computes every channel sample from the definition in
// double precision, with no polyphase or FFT structure:
//     Y_k[m] = (-1)^{k*m}/M * sum_l h[l] * x[(m+1)*M/2 - 1 - l] * e^{j*2*pi*k*l/M}
// and every output is compared with it (tolerance 3 LSB; the largest error
// is reported). Stimulus: random composite samples at random input gaps
// with random output backpressure, then a tone at the centre of channel 9,
// after which channel 9 must hold the constant -A*e^{-j*2*pi*9/M} and all
// other channels must be within 3 LSB of zero. Also checks frame count,
// channel order and out_last.
module tb_nmdfb_analysis;
  import cck_pkg::*;
  import cck_ref_pkg::*;
  localparam int M = 64, T = 12, D = M / 2, L = M * T;
  localparam int NRAND = 1200, NTONE = 1600, NS = NRAND + NTONE;
  localparam real A = 9000.0;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  cplx_t in_data, out_data;
  logic [5:0] out_chan;
  int checks = 0, failures = 0;

  nmdfb_analysis dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  real g [L];
  int  xr [NS], xi [NS];
  int  nout = 0, order_fail = 0;
  real maxerr = 0.0;

  initial for (int n = 0; n < L; n++) g[n] = proto(n, L, M, 7.857);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    automatic int  k = nout % M, m = nout / M;
    automatic int  t = (m + 1) * D - 1;
    automatic real er = 0.0, ei = 0.0, e, s;
    for (int l = 0; l < L && l <= t; l++) begin
      automatic real a = 2.0 * PI * ((k * l) % M) / M;
      er += g[l] * (xr[t - l] * $cos(a) - xi[t - l] * $sin(a));
      ei += g[l] * (xr[t - l] * $sin(a) + xi[t - l] * $cos(a));
    end
    s = ((k * m) % 2 == 1) ? -1.0 / M : 1.0 / M;
    er *= s; ei *= s;
    e = rabs(out_data.re - er) > rabs(out_data.im - ei) ? rabs(out_data.re - er) : rabs(out_data.im - ei);
    if (e > maxerr) maxerr = e;
    checks++;
    if (e > 3.0) begin
      failures++;
      if (failures < 10) $display("FAIL Y_%0d[%0d] got (%0d,%0d) exp (%0.1f,%0.1f)", k, m, out_data.re, out_data.im, er, ei);
    end
    if (out_chan != 6'(k) || out_last != (k == M - 1)) order_fail++;
    // tone in channel 9 once the filter holds only tone samples
    if (t - L + 1 >= NRAND && t < NS) begin
      automatic real a = -2.0 * PI * 9.0 / M;
      automatic real wr = (k == 9) ? -A * $cos(a) : 0.0;
      automatic real wi = (k == 9) ? -A * $sin(a) : 0.0;
      checks++;
      if (rabs(out_data.re - wr) > 3.0 || rabs(out_data.im - wi) > 3.0) begin
        failures++;
        if (failures < 20) $display("FAIL tone channel %0d frame %0d (%0d,%0d)", k, m, out_data.re, out_data.im);
      end
    end
    nout++;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  initial begin
    for (int n = 0; n < NS; n++) begin
      if (n < NRAND) begin
        xr[n] = $urandom_range(0, 24000) - 12000;
        xi[n] = $urandom_range(0, 24000) - 12000;
      end else begin
        xr[n] = $rtoi(A * $cos(2.0 * PI * ((9 * n) % M) / M));
        xi[n] = $rtoi(A * $sin(2.0 * PI * ((9 * n) % M) / M));
      end
    end
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NS; n++) begin
      in_valid = 1;
      in_data.re = sample_t'(xr[n]);
      in_data.im = sample_t'(xi[n]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (2000) @(posedge clk);
    checks++;
    if (nout != (NS / D) * M) begin failures++; $display("FAIL %0d outputs for %0d frames", nout, NS / D); end
    checks++;
    if (order_fail != 0) begin failures++; $display("FAIL channel index or out_last wrong %0d times", order_fail); end
    $display("largest error %0.2f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
