// Self-checking testbench for fft_serial (N = 64).
// Drives frames of random complex samples (and one single-bin frame), in
// forward and inverse mode, with and without per-stage scaling, and
// compares every output bin with a direct DFT computed in real arithmetic
// here. The tolerance covers the Q1.14 rounding of 6 stages. It also checks
// the document's compute time: 6 * 32 = 192 clocks between the last input
// and the first output, and that the
// butterfly phase lasts exactly that long.
module tb_fft_serial;
  import cck_pkg::*;
  localparam int N = 64;

  logic clk = 0, rst_n = 0;
  logic inverse, scale, in_valid, in_ready, out_valid, out_ready, out_last, busy;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;

  fft_serial #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  real xr[N], xi[N];
  int  busy_cycles;
  always @(posedge clk) if (busy) busy_cycles++;

  task automatic run_frame(input bit inv, input bit sc, input int tol);
    real er, ei, a, s;
    int  t_last, t_first, k;
    // drive
    busy_cycles = 0;
    @(negedge clk);
    inverse = inv; scale = sc;
    for (int n = 0; n < N; n++) begin
      in_valid   = 1;
      in_data.re = sample_t'($rtoi(xr[n] * 16384.0));
      in_data.im = sample_t'($rtoi(xi[n] * 16384.0));
      // use the quantised value for the reference
      xr[n] = real'(in_data.re) / 16384.0;
      xi[n] = real'(in_data.im) / 16384.0;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    t_last = int'($time / 10);
    while (!out_valid) @(negedge clk);
    t_first = int'($time / 10);
    checks++;
    if (t_first - t_last != N / 2 * $clog2(N)) begin
      failures++;
      $display("FAIL latency %0d", t_first - t_last);
    end
    checks++;
    if (busy_cycles != N / 2 * $clog2(N)) begin
      failures++;
      $display("FAIL busy cycles %0d", busy_cycles);
    end
    out_ready = 1;
    k = 0;
    while (k < N) begin
      if (out_valid) begin
        er = 0; ei = 0;
        for (int n = 0; n < N; n++) begin
          a  = 2.0 * 3.14159265358979 * real'(k * n % N) / real'(N);
          s  = inv ? 1.0 : -1.0;
          er += xr[n] * $cos(a) - s * xi[n] * $sin(a);
          ei += xi[n] * $cos(a) + s * xr[n] * $sin(a);
        end
        if (sc) begin er = er / N; ei = ei / N; end
        checks++;
        if (rabs(real'(out_data.re) - er * 16384.0) > tol ||
            rabs(real'(out_data.im) - ei * 16384.0) > tol) begin
          failures++;
          $display("FAIL inv=%0d sc=%0d bin %0d got %0d,%0d exp %0.1f,%0.1f", inv, sc, k,
                   out_data.re, out_data.im, er * 16384.0, ei * 16384.0);
        end
        checks++;
        if (out_last != (k == N - 1)) failures++;
        k++;
      end
      @(negedge clk);
    end
    out_ready = 0;
  endtask

  initial begin
    in_valid = 0; out_ready = 0; inverse = 0; scale = 1; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random frames, scaled, forward and inverse
    for (int f = 0; f < 4; f++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = (real'($urandom_range(0, 20000)) - 10000.0) / 16384.0;
        xi[n] = (real'($urandom_range(0, 20000)) - 10000.0) / 16384.0;
      end
      run_frame(f[0], 1'b1, 4);
    end
    // single bin 1, inverse: one cosine / sine period
    for (int n = 0; n < N; n++) begin xr[n] = 0; xi[n] = 0; end
    xr[1] = 0.7;
    run_frame(1'b1, 1'b1, 3);
    // unscaled forward transform of a small signal
    for (int n = 0; n < N; n++) begin
      xr[n] = (real'($urandom_range(0, 400)) - 200.0) / 16384.0;
      xi[n] = (real'($urandom_range(0, 400)) - 200.0) / 16384.0;
    end
    run_frame(1'b0, 1'b0, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
