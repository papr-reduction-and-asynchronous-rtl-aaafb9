// End-to-end testbench for cck_ofdm_top at its default parameters.
// The transmit baseband is looped back into the receiver. Two frames of
// random codewords are sent; every decoded codeword must equal the sent
// one, in order, and the receiver must never refuse a looped-back sample.
// The interpolated output of the two polyphase filter banks is checked
// sample by sample against a real-arithmetic model of the 768-tap
// Kaiser-sinc interpolator driven by the same baseband (3 LSB), and path
// 63 must equal the baseband delayed by 5 samples exactly.
// Mechanisms that must each occur at least once (counted, a failure if
// never seen): preamble detection, transmit IFFT runs, receive FFT runs,
// interleaver and de-interleaver runs, transmitter stalled by the filter
// banks (backpressure), preamble symbols discarded by the receiver.
//
// Channelizers: the composite output of the synthesis channelizer is fed
// through a queue into the analysis channelizer. Channel frames carry a
// constant A on channel 3 and B on channel 10 and zero elsewhere; once
// both filters have filled, analysis channel k must hold
// X_k/64 * (-1)^k * e^{-j*2*pi*k/64} (within 3 LSB) and every other
// channel must be within 3 LSB of zero (channel isolation). Counted:
// synthesis frames, odd frames (phase-correction offset used), analysis
// frames, cycles the analysis side held the composite off.
module tb_cck_ofdm_top;
  import cck_pkg::*;
  localparam int N = 64, NSYM = 4, M = N / 8, P = 64, T = 12, L = P * T;

  logic clk = 0, rst_n = 0;
  logic tx_start, tx_busy, tx_data_valid, tx_data_ready;
  qphase_t tx_data_phase [4];
  logic tx_bb_valid, tx_bb_sof, tx_if_valid;
  cplx_t tx_bb_data, tx_if_data;
  logic [5:0] tx_if_phase;
  logic rx_in_valid, rx_in_ready, rx_in_sof, rx_detect, rx_out_valid;
  cplx_t rx_in_data;
  qphase_t rx_out_phase [4];
  logic ch_in_valid, ch_in_ready, ch_mux_valid;
  cplx_t ch_in_data, ch_mux_data;
  logic an_in_valid, an_in_ready, an_out_valid, an_out_ready, an_out_last;
  cplx_t an_in_data, an_out_data;
  logic [5:0] an_out_chan;
  logic rx_est_valid, pf_valid;
  cplx_t rx_est_data, pf_data;
  logic [5:0] rx_est_bin, an_sel;
  int checks = 0, failures = 0;

  cck_ofdm_top dut (.*);
  always #5 clk = ~clk;

  // loopback
  assign rx_in_valid = tx_bb_valid;
  assign rx_in_data  = tx_bb_data;
  assign rx_in_sof   = tx_bb_sof;

  initial begin
    #20000000;
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

  real href [L];
  initial begin
    real u, v;
    for (int n = 0; n < L; n++) begin
      if (n == L - 1) href[n] = 0.0;
      else begin
        u = (n - 383.0) / P;
        v = (n - 383.0) / 383.0;
        href[n] = (u == 0.0 ? 1.0 : $sin(3.14159265358979 * u) / (3.14159265358979 * u))
                  * i0(7.857 * $sqrt(1.0 - v * v)) / i0(7.857);
      end
    end
  end

  int codes [$][4];
  int taken = 0, ndec = 0;
  // mechanism counters
  int n_detect = 0, n_ifft = 0, n_fft = 0, n_il = 0, n_dil = 0, n_stall = 0, n_pre_drop = 0, n_if = 0;

  always @(negedge clk) begin
    tx_data_valid = (taken < codes.size());
    if (taken < codes.size()) for (int k = 0; k < 4; k++) tx_data_phase[k] = qphase_t'(codes[taken][k]);
  end

  real bb_re [$], bb_im [$];   // baseband history, newest first
  always @(posedge clk) if (rst_n) begin
    if (tx_data_valid && tx_data_ready) taken++;
    // interpolated output against the model (output of this clock is formed
    // before a baseband sample taken on the same edge)
    if (tx_if_valid) begin
      automatic real er = 0.0, ei = 0.0;
      for (int t = 0; t < T; t++) if (t < bb_re.size()) begin
        er += href[int'(tx_if_phase) + P * t] * bb_re[t];
        ei += href[int'(tx_if_phase) + P * t] * bb_im[t];
      end
      checks++;
      if (rabs(tx_if_data.re - er) > 3.0 || rabs(tx_if_data.im - ei) > 3.0) begin
        failures++;
        $display("FAIL interpolated sample phase %0d got %0d,%0d exp %0.1f,%0.1f",
                 tx_if_phase, tx_if_data.re, tx_if_data.im, er, ei);
      end
      if (tx_if_phase == 6'd63 && bb_re.size() > 5) begin
        checks++;
        if (real'(tx_if_data.re) != bb_re[5] || real'(tx_if_data.im) != bb_im[5]) begin
          failures++;
          $display("FAIL path 63 is not a pure delay");
        end
      end
      n_if++;
    end
    if (tx_bb_valid) begin
      bb_re.push_front(real'(tx_bb_data.re));
      bb_im.push_front(real'(tx_bb_data.im));
      checks++;
      if (!rx_in_ready) begin failures++; $display("FAIL receiver refused a sample"); end
    end
    if (rx_out_valid) begin
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (ndec >= codes.size() || int'(rx_out_phase[k]) != codes[ndec][k]) begin
          failures++;
          $display("FAIL codeword %0d phase %0d got %0d", ndec, k + 1, rx_out_phase[k]);
        end
      end
      ndec++;
    end
    if (rx_detect) n_detect++;
    if (dut.u_tx.u_ifft.in_valid && dut.u_tx.u_ifft.in_ready && dut.u_tx.u_ifft.cnt == '1) n_ifft++;
    if (dut.u_rx.u_fft.in_valid && dut.u_rx.u_fft.in_ready && dut.u_rx.u_fft.cnt == '1) n_fft++;
    if (dut.u_tx.u_il.out_valid && dut.u_tx.u_il.out_ready && dut.u_tx.u_il.out_last) n_il++;
    if (dut.u_rx.u_dil.out_valid && dut.u_rx.u_dil.out_last) n_dil++;
    if (dut.bb_valid && !dut.bb_ready) n_stall++;
    if (dut.u_rx.u_fft.out_valid && dut.u_rx.u_fft.out_last && dut.u_rx.is_pre) n_pre_drop++;
  end

  // ---------------- channelizer loopback ----------------
  localparam int NCF = 100;               // synthesis frames sent
  localparam real CA = 16000.0, CB = -12000.0;
  cplx_t mux_q [$];
  int n_syn = 0, n_syn_odd = 0, n_ana = 0, n_hold = 0, ana_idx = 0, n_pf = 0, n_est = 0;
  assign an_sel = 6'd3;
  bit ch_done = 0;
  real ch_maxerr = 0.0;

  assign an_in_valid  = mux_q.size() > 0;
  assign an_in_data   = an_in_valid ? mux_q[0] : '0;
  assign an_out_ready = 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (an_in_valid && an_in_ready) void'(mux_q.pop_front());
    if (an_in_valid && !an_in_ready) n_hold++;
    if (ch_mux_valid) mux_q.push_back(ch_mux_data);
    if (ch_in_valid && ch_in_ready && dut.u_syn.u_ifft.cnt == '1) n_syn++;
    if (ch_mux_valid && dut.u_syn.d == '0 && dut.u_syn.odd) n_syn_odd++;
    if (pf_valid) begin
      // settled: analysis steady from frame 52, then the 38 filter taps
      if (n_pf >= 52 + 38 && n_pf < NCF - 2) begin
        automatic real a  = -2.0 * 3.14159265358979 * 3 / P;
        automatic real er = -CA / P * $cos(a), ei = -CA / P * $sin(a);
        checks++;
        if (rabs(pf_data.re - er) > 2.0 || rabs(pf_data.im - ei) > 2.0) begin
          failures++;
          $display("FAIL pre-filtered channel 3 sample %0d got %h exp (%0.1f,%0.1f)", n_pf, pf_data, er, ei);
        end
      end
      n_pf++;
    end
    if (rx_est_valid) begin
      checks++;
      if (rabs(rx_est_data.re - 16384.0) > 64.0 || rabs(rx_est_data.im) > 64.0) begin
        failures++;
        $display("FAIL channel estimate bin %0d = %h", rx_est_bin, rx_est_data);
      end
      n_est++;
    end
    if (an_out_valid) begin
      automatic int k = ana_idx % P, m = ana_idx / P;
      // steady state: synthesis filled (24 frames) and analysis filled
      // (another 24 frames) with a margin
      if (m >= 52 && m < NCF - 2) begin
        automatic real a  = -2.0 * 3.14159265358979 * k / P;
        automatic real x  = (k == 3) ? CA / P : (k == 10) ? CB / P : 0.0;
        automatic real sg = (k % 2 == 1) ? -1.0 : 1.0;
        automatic real er = sg * x * $cos(a), ei = sg * x * $sin(a);
        automatic real e  = rabs(an_out_data.re - er) > rabs(an_out_data.im - ei) ?
                            rabs(an_out_data.re - er) : rabs(an_out_data.im - ei);
        if (e > ch_maxerr) ch_maxerr = e;
        checks++;
        if (e > 3.0) begin
          failures++;
          $display("FAIL channelizer loopback channel %0d frame %0d got (%0d,%0d) exp (%0.1f,%0.1f)",
                   k, m, an_out_data.re, an_out_data.im, er, ei);
        end
      end
      if (an_out_last) n_ana++;
      ana_idx++;
    end
  end

  initial begin
    ch_in_valid = 0; ch_in_data = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int m = 0; m < NCF; m++)
      for (int k = 0; k < P; k++) begin
        ch_in_valid = 1;
        ch_in_data.re = sample_t'(k == 3 ? $rtoi(CA) : k == 10 ? $rtoi(CB) : 0);
        ch_in_data.im = '0;
        @(posedge clk);
        while (!ch_in_ready) @(posedge clk);
        @(negedge clk);
        ch_in_valid = 0;
      end
    repeat (3000) @(negedge clk);
    ch_done = 1;
  end

  task automatic mech(input string name, input int n, input int expect_n);
    checks++;
    $display("%s: %0d", name, n);
    if (n == 0 || (expect_n > 0 && n != expect_n)) begin
      failures++;
      $display("FAIL mechanism %s count %0d (expected %0d)", name, n, expect_n);
    end
  endtask

  initial begin
    tx_start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < M * NSYM; i++) begin
        int c [4];
        for (int k = 0; k < 4; k++) c[k] = $urandom_range(0, 3);
        codes.push_back(c);
      end
      @(negedge clk); tx_start = 1; @(negedge clk); tx_start = 0;
      while (ndec < codes.size()) @(negedge clk);
    end
    repeat (2 * P * (N + N / 4)) @(negedge clk);   // let the filter banks drain
    while (!ch_done) @(negedge clk);
    checks++;
    if (ndec != 2 * M * NSYM) begin failures++; $display("FAIL %0d codewords decoded", ndec); end
    mech("preamble detections", n_detect, 2);
    mech("transmit IFFT runs", n_ifft, 2 * (NSYM + 1));
    mech("receive FFT runs", n_fft, 2 * (NSYM + 1));
    mech("interleaver runs", n_il, 2 * NSYM);
    mech("de-interleaver runs", n_dil, 2 * NSYM);
    mech("transmitter stall cycles", n_stall, 0);
    mech("preamble symbols discarded", n_pre_drop, 2);
    mech("interpolated samples", n_if, 2 * (NSYM + 1) * (N + N / 4) * P);
    mech("synthesis channelizer frames", n_syn, NCF);
    mech("synthesis frames with phase-correction offset", n_syn_odd, NCF / 2);
    mech("analysis channelizer frames", n_ana, 0);
    mech("composite samples held off by the analysis side", n_hold, 0);
    mech("pre-filtered channel samples", n_pf, NCF);
    mech("receiver channel estimates", n_est, 2 * (N / 2 - 1));
    $display("channelizer loopback largest error %0.2f LSB", ch_maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
