// Self-checking testbench for polyphase_fb (64 paths x 12 taps).
// A reference model here computes the Kaiser-windowed sinc prototype in
// double precision and the up-sampled, filtered output directly; every one
// of the 64 outputs per input is compared with it (tolerance 3 LSB for the
// coefficient and output rounding). Further checks: path 63 returns the
// input delayed by 5 samples exactly (Nyquist zeros of the prototype), a
// constant input gives the same constant on every path, inputs are taken
// back to back every 64 clocks and each produces exactly 64 outputs.
module tb_polyphase_fb;
  import cck_pkg::*;
  localparam int P = 64, T = 12, L = P * T;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  sample_t in_data, out_data;
  logic [5:0] out_phase;
  int checks = 0, failures = 0;

  polyphase_fb dut (.*);
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

  real href[L];
  real hist[$];          // inputs, newest first
  int  nin = 0, nout = 0, last_in_time = -1, gap_fail = 0;

  initial begin
    automatic real c = 383.0;
    real u, v;
    for (int n = 0; n < L; n++) begin
      if (n == L - 1) href[n] = 0.0;
      else begin
        u = (n - c) / P;
        v = (n - c) / c;
        href[n] = (u == 0.0 ? 1.0 : $sin(3.14159265358979 * u) / (3.14159265358979 * u))
                  * i0(7.857 * $sqrt(1.0 - v * v)) / i0(7.857);
      end
    end
  end

  // monitor: compare every output with the reference (the output of this
  // clock was formed before an input taken on the same edge)
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      automatic real e = 0.0;
      for (int t = 0; t < T; t++)
        if (t < hist.size()) e += href[int'(out_phase) + P * t] * hist[t];
      checks++;
      if (rabs(real'(out_data) - e) > 3.0) begin
        failures++;
        $display("FAIL phase %0d got %0d exp %0.2f", out_phase, out_data, e);
      end
      if (out_phase == 6'd63) begin
        checks++;
        if (real'(out_data) != (hist.size() > 5 ? hist[5] : 0.0)) begin
          failures++;
          $display("FAIL path 63 not a pure delay: %0d", out_data);
        end
      end
      nout++;
    end
    if (in_valid && in_ready) begin
      hist.push_front(real'(in_data));
      if (last_in_time >= 0 && int'($time / 10) - last_in_time != P) gap_fail++;
      last_in_time = int'($time / 10);
      nin++;
    end
  end

  initial begin
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // low-rate input: a low-frequency sine plus a high-frequency component,
    // then random values, then a constant
    for (int n = 0; n < 120; n++) begin
      in_valid = 1;
      if (n < 40)      in_data = sample_t'($rtoi(6000.0 * $sin(0.2 * n) + 3000.0 * $sin(2.9 * n)));
      else if (n < 80) in_data = sample_t'($urandom_range(0, 30000)) - 16'sd15000;
      else             in_data = 16'sd8000;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      // wait until the filter takes the next sample (back to back)
      while (!(in_ready)) @(negedge clk);
      if (n == 119) begin
        // constant input has settled: every path must give 8000 (+-2)
        checks++;
        if (rabs(real'(out_data) - 8000.0) > 2.0) begin
          failures++;
          $display("FAIL DC gain %0d", out_data);
        end
      end
    end
    repeat (P + 2) @(posedge clk);
    checks++;
    if (nout != nin * P) begin failures++; $display("FAIL %0d outputs for %0d inputs", nout, nin); end
    checks++;
    if (gap_fail != 0) begin failures++; $display("FAIL input spacing not %0d clocks", P); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
