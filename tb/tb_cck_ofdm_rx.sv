// Self-checking testbench for cck_ofdm_rx (N = 64).
// Frames of a preamble and 4 data symbols are built by the reference model
// (real arithmetic, rounded to Q1.14, with +-3 LSB of noise added), sent
// with gaps in in_valid, and the decoded phases of all 32 codewords per
// frame must equal the sent ones, in order. The frame detector must pulse
// exactly once per frame, during the preamble symbol. Two frames. The
// preamble of the second frame passes through a channel gain of
// 0.6*e^{j*0.5} (the first frame's is 1): the channel estimate of each of
// the 31 preamble bins must equal that gain within 160 LSB (1 %, the
// added noise) and carry its bin index 2, 4, .., 62 in order.
module tb_cck_ofdm_rx;
  import cck_pkg::*;
  import cck_ref_pkg::*;
  localparam int N = 64, NSYM = 4, M = N / 8, SL = N + N / 4;

  logic clk = 0, rst_n = 0, in_valid, in_ready, in_sof, detect, out_valid;
  cplx_t in_data;
  qphase_t out_phase [4];
  logic est_valid;
  cplx_t est_data;
  logic [5:0] est_bin;
  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction
  real gain_re = 1.0, gain_im = 0.0;
  int  nest = 0;
  int checks = 0, failures = 0;

  cck_ofdm_rx dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int codes [][4];
  int ndec = 0, ndet = 0, sent = 0, det_pos = -1;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (ndec >= codes.size() || int'(out_phase[k]) != codes[ndec][k]) begin
          failures++;
          $display("FAIL codeword %0d phase %0d got %0d", ndec, k + 1, out_phase[k]);
        end
      end
      ndec++;
    end
    if (detect) begin ndet++; det_pos = sent; end
    if (est_valid) begin
      checks++;
      if (est_bin != 6'(2 * (nest + 1)) || rabs(real'(est_data.re) - 16384.0 * gain_re) > 160.0
          || rabs(real'(est_data.im) - 16384.0 * gain_im) > 160.0) begin
        failures++;
        $display("FAIL estimate %0d bin %0d got %h exp (%0.0f,%0.0f)", nest, est_bin, est_data,
                 16384.0 * gain_re, 16384.0 * gain_im);
      end
      nest++;
    end
  end

  initial begin
    real br [], bi [], xr [], xi [], fr [$], fi [$];
    int  cw [][4];
    in_valid = 0; in_sof = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      codes = new[M * NSYM];
      foreach (codes[i]) for (int k = 0; k < 4; k++) codes[i][k] = $urandom_range(0, 3);
      fr.delete(); fi.delete();
      gain_re = (f == 0) ? 1.0 : 0.6 * $cos(0.5);
      gain_im = (f == 0) ? 0.0 : 0.6 * $sin(0.5);
      preamble_bins(N, 8192.0, br, bi);
      symbol(N, br, bi, xr, xi);
      foreach (xr[t]) begin
        fr.push_back(xr[t] * gain_re - xi[t] * gain_im);
        fi.push_back(xr[t] * gain_im + xi[t] * gain_re);
      end
      for (int s = 0; s < NSYM; s++) begin
        cw = new[M];
        for (int r = 0; r < M; r++) cw[r] = codes[s * M + r];
        data_bins(N, cw, 16384.0, br, bi);
        symbol(N, br, bi, xr, xi);
        foreach (xr[t]) begin fr.push_back(xr[t]); fi.push_back(xi[t]); end
      end
      ndec = 0; ndet = 0; sent = 0; det_pos = -1; nest = 0;
      for (int t = 0; t < fr.size(); ) begin
        @(negedge clk);
        in_valid   = ($urandom_range(0, 3) != 0);
        in_sof     = (t == 0);
        in_data.re = sample_t'($rtoi(fr[t] + (fr[t] < 0 ? -0.5 : 0.5)) + $urandom_range(0, 6) - 3);
        in_data.im = sample_t'($rtoi(fi[t] + (fi[t] < 0 ? -0.5 : 0.5)) + $urandom_range(0, 6) - 3);
        @(posedge clk);
        if (in_valid && in_ready) begin t++; sent = t; end
      end
      @(negedge clk);
      in_valid = 0; in_sof = 0;
      repeat (3000) @(negedge clk);
      checks++;
      if (ndec != M * NSYM) begin failures++; $display("FAIL frame %0d: %0d codewords decoded", f, ndec); end
      checks++;
      if (nest != N / 2 - 1) begin failures++; $display("FAIL frame %0d: %0d channel estimates", f, nest); end
      checks++;
      if (ndet != 1 || det_pos < SL / 2 || det_pos > SL) begin
        failures++;
        $display("FAIL frame %0d: %0d detections, at sample %0d", f, ndet, det_pos);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
