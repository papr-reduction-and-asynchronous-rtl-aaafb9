// Self-checking testbench for cck_interleaver (N = 64, L = 8, M = 8).
// Transmit mode: eight random CCK codewords (from the code equation) are
// interleaved; every output bin is compared with the interleaving sum in
// real arithmetic, the time signal (direct IDFT here) must have a
// peak-to-average power ratio of at most 2 (+ quantisation margin), which
// holds only if the codewords do not overlap in time. Receive mode: the
// transmit output is fed back and the chips must come back. The N*M = 512
// clock computation time is checked too.
module tb_cck_interleaver;
  import cck_pkg::*;
  localparam int N = 64, L = 8, M = 8;
  logic clk = 0, rst_n = 0, deinterleave, in_valid, in_ready, out_valid, out_ready, out_last;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;

  cck_interleaver dut (.*);
  always #5 clk = ~clk;

  initial begin
    #3000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  localparam int SIGNS [8] = '{0, 0, 1, 1, 1, 0, 1, 0};
  cplx_t chips [N];
  cplx_t res [N];
  int    t0, t1;

  task automatic run(input bit deint, input cplx_t din [N]);
    @(negedge clk);
    deinterleave = deint;
    for (int n = 0; n < N; n++) begin
      in_valid = 1; in_data = din[n];
      @(negedge clk);
    end
    in_valid = 0;
    t0 = int'($time / 10);
    while (!out_valid) @(negedge clk);
    t1 = int'($time / 10);
    checks++;
    if (t1 - t0 != N * M) begin failures++; $display("FAIL compute time %0d", t1 - t0); end
    out_ready = 1;
    for (int n = 0; n < N; n++) begin
      res[n] = out_data;
      checks++;
      if (out_last != (n == N - 1)) failures++;
      @(negedge clk);
    end
    out_ready = 0;
  endtask

  initial begin
    real er, ei, a, pk, avg, p, xr, xi;
    int th, code;
    in_valid = 0; out_ready = 0; deinterleave = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int r = 0; r < M; r++) begin
        code = $urandom_range(0, 255);
        for (int i = 0; i < L; i++) begin
          th = ((code >> 6) & 3) + (i % 2) * (code & 3) + ((i / 2) % 2) * ((code >> 2) & 3)
               + (i / 4) * ((code >> 4) & 3) + 2 * SIGNS[i];
          chips[r * L + i] = qpsk_point(qphase_t'(th), 16'sd16384);
        end
      end
      run(1'b0, chips);
      // interleaving sum
      for (int k = 0; k < N; k++) begin
        er = 0; ei = 0;
        for (int r = 0; r < M; r++) begin
          a = -2.0 * 3.14159265358979 * ((k * r) % N) / N;
          er += chips[r * L + k % L].re * $cos(a) - chips[r * L + k % L].im * $sin(a);
          ei += chips[r * L + k % L].re * $sin(a) + chips[r * L + k % L].im * $cos(a);
        end
        checks++;
        if (rabs(res[k].re - er / M) > 2.0 || rabs(res[k].im - ei / M) > 2.0) begin
          failures++;
          $display("FAIL bin %0d got %0d,%0d exp %0.1f,%0.1f", k, res[k].re, res[k].im, er / M, ei / M);
        end
      end
      // time signal: PAPR and interleaving of the codewords
      pk = 0; avg = 0;
      for (int n = 0; n < N; n++) begin
        xr = 0; xi = 0;
        for (int k = 0; k < N; k++) begin
          a = 2.0 * 3.14159265358979 * ((k * n) % N) / N;
          xr += res[k].re * $cos(a) - res[k].im * $sin(a);
          xi += res[k].re * $sin(a) + res[k].im * $cos(a);
        end
        p = xr * xr + xi * xi;
        avg += p / N;
        if (p > pk) pk = p;
      end
      checks++;
      if (pk / avg > 2.02) begin failures++; $display("FAIL PAPR %f", pk / avg); end
      // receive dual
      run(1'b1, res);
      for (int n = 0; n < N; n++) begin
        checks++;
        if (rabs(res[n].re - chips[n].re) > 12.0 || rabs(res[n].im - chips[n].im) > 12.0) begin
          failures++;
          $display("FAIL deinterleave %0d got %0d,%0d exp %0d,%0d", n, res[n].re, res[n].im,
                   chips[n].re, chips[n].im);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
