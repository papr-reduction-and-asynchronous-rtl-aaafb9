// Self-checking testbench for frame_detector (D = 32).
// Input: random data, then a preamble of 5 periods of a random 32-sample
// pattern, then random data again, with small noise throughout. A model
// here computes |P|^2/R^2 over the same windows in real arithmetic; the
// `present` output must agree with metric > 0.5 on every sample (samples
// with the metric within 0.02 of the threshold are not judged), and
// `detect` must pulse exactly once, inside the preamble.
module tb_frame_detector;
  import cck_pkg::*;
  localparam int D = 32;
  logic clk = 0, rst_n = 0, in_valid, present, detect;
  cplx_t in_data;
  int checks = 0, failures = 0;

  frame_detector dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NS = 600, PRE0 = 200, PRE1 = 200 + 5 * D;
  real xr[NS], xi[NS];
  int  ndet = 0, det_at = -1;

  initial begin
    real pat_r[D], pat_i[D];
    real pr, pi, e, m;
    for (int k = 0; k < D; k++) begin
      pat_r[k] = real'($urandom_range(0, 16000)) - 8000.0;
      pat_i[k] = real'($urandom_range(0, 16000)) - 8000.0;
    end
    for (int n = 0; n < NS; n++) begin
      if (n >= PRE0 && n < PRE1) begin
        xr[n] = pat_r[(n - PRE0) % D] + real'($urandom_range(0, 200)) - 100.0;
        xi[n] = pat_i[(n - PRE0) % D] + real'($urandom_range(0, 200)) - 100.0;
      end else begin
        xr[n] = real'($urandom_range(0, 16000)) - 8000.0;
        xi[n] = real'($urandom_range(0, 16000)) - 8000.0;
      end
      xr[n] = real'($rtoi(xr[n])); xi[n] = real'($rtoi(xi[n]));
    end
    in_valid = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_data.re = sample_t'($rtoi(xr[n]));
      in_data.im = sample_t'($rtoi(xi[n]));
      @(negedge clk);
      in_valid = 0;
      // model
      pr = 0; pi = 0; e = 0;
      for (int k = 0; k < D; k++) begin
        if (n - k >= 0) e += xr[n-k] * xr[n-k] + xi[n-k] * xi[n-k];
        if (n - k - D >= 0) begin
          pr += xr[n-k] * xr[n-k-D] + xi[n-k] * xi[n-k-D];
          pi += xi[n-k] * xr[n-k-D] - xr[n-k] * xi[n-k-D];
        end
      end
      m = (pr * pr + pi * pi) / (e * e);
      if (m > 0.52 || m < 0.48) begin
        checks++;
        if (present != (m > 0.5)) begin
          failures++;
          $display("FAIL sample %0d metric %f present %0d", n, m, present);
        end
      end
      if (detect) begin ndet++; det_at = n; end
    end
    checks++;
    if (ndet != 1 || det_at < PRE0 + D || det_at >= PRE1) begin
      failures++;
      $display("FAIL %0d detections, last at %0d", ndet, det_at);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
