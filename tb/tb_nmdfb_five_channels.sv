// Workload testbench: five packets multiplexed on one composite signal.
// nmdfb_synth and nmdfb_analysis (64 channels, defaults) are connected
// through a queue, as in a link with an ideal channel. Channels 1, 5, 6,
// -3 (= 61) and -5 (= 59) each carry a packet: a complex tone of
// amplitude 16000 at its own frequency inside the channel's band (at most
// 0.1 cycle per channel sample, against a channel band of +-0.25), with
// its own start phase; the other 59 channels are empty. Channels 5 and 6
// are adjacent. Once both filter banks have filled, every output frame is
// checked: each active channel must return its packet at the constant
// amplitude 16000/64 = 250 within 3 LSB (so no neighbour leaks into it,
// which would make the amplitude beat), and its phase must advance by the
// packet's frequency from frame to frame within 0.02 rad; every empty
// channel must stay within 3 LSB of zero.
module tb_nmdfb_five_channels;
  import cck_pkg::*;
  localparam int M = 64, NF = 90, SETTLE = 52;
  localparam real PI = 3.14159265358979, A = 16000.0;
  localparam int  CH [5] = '{1, 5, 6, 61, 59};
  localparam real FR [5] = '{0.05, -0.08, 0.1, -0.03, 0.07};

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, c_valid, a_valid, a_ready, y_valid, y_last;
  cplx_t s_data, c_data, a_data, y_data;
  logic [5:0] y_chan;
  int checks = 0, failures = 0;

  nmdfb_synth    u_syn (.clk, .rst_n, .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data),
                        .out_valid(c_valid), .out_data(c_data));
  nmdfb_analysis u_ana (.clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
                        .out_valid(y_valid), .out_ready(1'b1), .out_data(y_data),
                        .out_chan(y_chan), .out_last(y_last));
  always #5 clk = ~clk;

  initial begin
    #50000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  cplx_t q [$];
  assign a_valid = q.size() > 0;
  assign a_data  = a_valid ? q[0] : '0;

  int  nout = 0, nframes = 0;
  real prev_ph [5];
  real max_amp_err = 0.0, max_empty = 0.0, max_ph_err = 0.0;

  always @(posedge clk) if (rst_n) begin
    if (a_valid && a_ready) void'(q.pop_front());
    if (c_valid) q.push_back(c_data);
    if (y_valid) begin
      automatic int  k = nout % M, m = nout / M, idx = -1;
      automatic real mag = $sqrt(real'(y_data.re) ** 2 + real'(y_data.im) ** 2);
      for (int i = 0; i < 5; i++) if (CH[i] == k) idx = i;
      if (m >= SETTLE) begin
        checks++;
        if (idx < 0) begin
          if (mag > max_empty) max_empty = mag;
          if (rabs(y_data.re) > 3.0 || rabs(y_data.im) > 3.0) begin
            failures++;
            $display("FAIL empty channel %0d frame %0d holds %h", k, m, y_data);
          end
        end else begin
          automatic real ph = $atan2(real'(y_data.im), real'(y_data.re));
          if (rabs(mag - A / M) > max_amp_err) max_amp_err = rabs(mag - A / M);
          if (rabs(mag - A / M) > 3.0) begin
            failures++;
            $display("FAIL channel %0d frame %0d amplitude %0.2f", k, m, mag);
          end
          if (m > SETTLE) begin
            automatic real d = ph - prev_ph[idx] - 2.0 * PI * FR[idx];
            while (d > PI) d -= 2.0 * PI;
            while (d < -PI) d += 2.0 * PI;
            if (rabs(d) > max_ph_err) max_ph_err = rabs(d);
            checks++;
            if (rabs(d) > 0.02) begin
              failures++;
              $display("FAIL channel %0d frame %0d phase step off by %0.4f rad", k, m, d);
            end
          end
          prev_ph[idx] = ph;
        end
      end
      if (y_last) nframes++;
      nout++;
    end
  end

  initial begin
    s_valid = 0; s_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int m = 0; m < NF; m++)
      for (int k = 0; k < M; k++) begin
        automatic int idx = -1;
        for (int i = 0; i < 5; i++) if (CH[i] == k) idx = i;
        s_valid = 1;
        if (idx < 0) s_data = '0;
        else begin
          automatic real a = 2.0 * PI * FR[idx] * m + 0.7 * idx;
          s_data.re = sample_t'($rtoi(A * $cos(a)));
          s_data.im = sample_t'($rtoi(A * $sin(a)));
        end
        @(posedge clk);
        while (!s_ready) @(posedge clk);
        @(negedge clk);
        s_valid = 0;
      end
    repeat (3000) @(negedge clk);
    checks++;
    if (nframes != NF) begin failures++; $display("FAIL %0d analysis frames for %0d sent", nframes, NF); end
    $display("active channels: amplitude error up to %0.2f LSB, phase step error up to %0.4f rad; empty channels up to %0.2f LSB",
             max_amp_err, max_ph_err, max_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
