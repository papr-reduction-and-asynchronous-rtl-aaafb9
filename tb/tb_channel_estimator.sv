// Self-checking testbench for channel_estimator.
// Random received bins Y[k] = H[k]*X[k] (a random channel on the known
// preamble) are fed to two estimators, one for the short preamble
// (STEP = 2, default) and one for a long preamble (STEP = 1). The known preamble X[k] is built here from
// its definition (amplitude 8192, phase m*(m+1)/2 quarter turns on bin
// STEP*m) in real arithmetic. Every estimate must equal Y[k]/X[k] within
// 1 LSB, appear exactly one clock after its bin, carry the right bin
// index, and only preamble bins may produce an estimate. Three preamble
// symbols are sent with random gaps between bins.
module tb_channel_estimator;
  import cck_pkg::*;
  localparam int N = 64;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_last;
  cplx_t in_data;
  logic v2, v1;
  cplx_t d2, d1;
  logic [5:0] b2, b1;
  int checks = 0, failures = 0;

  channel_estimator #(.STEP(2)) dut2 (.clk, .rst_n, .in_valid, .in_data, .in_last,
                                      .out_valid(v2), .out_data(d2), .out_bin(b2));
  channel_estimator #(.STEP(1)) dut1 (.clk, .rst_n, .in_valid, .in_data, .in_last,
                                      .out_valid(v1), .out_data(d1), .out_bin(b1));
  always #5 clk = ~clk;

  initial begin
    #2000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  int n2 = 0, n1 = 0;

  // expected estimate H = Y*conj(X)/|X|^2 of the bin presented one clock
  // earlier (k, y), for an estimator with the given step
  task automatic expect_est(input int step, input logic v, input cplx_t d, input logic [5:0] b,
                            input int k, input bit was_valid, input real yr, input real yi);
    bit pilot = was_valid && (k % step == 0) && k != 0;
    checks++;
    if (v != pilot) begin
      failures++;
      $display("FAIL step %0d: valid %0d for bin %0d", step, v, k);
    end else if (pilot) begin
      int  m = k / step;
      real a = PI / 2.0 * ((m * (m + 1) / 2) % 4);
      real er = (yr * $cos(a) + yi * $sin(a)) / 8192.0 * 16384.0;
      real ei = (yi * $cos(a) - yr * $sin(a)) / 8192.0 * 16384.0;
      checks++;
      if (b != 6'(k) || rabs(d.re - er) > 1.0 || rabs(d.im - ei) > 1.0) begin
        failures++;
        $display("FAIL step %0d bin %0d (%0d): got (%0d,%0d) exp (%0.1f,%0.1f)", step, k, b, d.re, d.im, er, ei);
      end
    end
  endtask

  int  cur_k = 0, last_k = 0;
  bit  last_v = 0;
  real last_yr = 0.0, last_yi = 0.0;
  always @(posedge clk) if (rst_n) begin
    expect_est(2, v2, d2, b2, last_k, last_v, last_yr, last_yi);
    expect_est(1, v1, d1, b1, last_k, last_v, last_yr, last_yi);
    if (v2) n2++;
    if (v1) n1++;
    last_v  = in_valid;
    last_k  = cur_k;
    last_yr = real'(in_data.re);
    last_yi = real'(in_data.im);
    if (in_valid) cur_k = in_last ? 0 : cur_k + 1;
  end

  real yr [N], yi [N];

  initial begin
    in_valid = 0; in_last = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      // received bins of this symbol: random Y[k] = H[k]*X[k] with |H| < 1.3
      // per rail, which is the same as a random channel on a known preamble
      for (int k = 0; k < N; k++) begin
        int ur, ui;
        ur = $urandom_range(0, 1800);
        ui = $urandom_range(0, 1800);
        yr[k] = $rtoi((ur - 900) / 1000.0 * 8192.0);
        yi[k] = $rtoi((ui - 900) / 1000.0 * 8192.0);
      end
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        in_valid = 1;
        in_last  = (k == N - 1);
        in_data.re = sample_t'($rtoi(yr[k]));
        in_data.im = sample_t'($rtoi(yi[k]));
        @(negedge clk);
        in_valid = 0; in_last = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    repeat (4) @(posedge clk);
    checks++;
    if (n2 != 3 * (N / 2 - 1) || n1 != 3 * (N - 1)) begin
      failures++;
      $display("FAIL estimate counts %0d %0d", n2, n1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
