// Self-checking testbench for cck_ofdm_tx (N = 64, NSYM = 4).
// Sends two frames of random codewords and compares every baseband sample
// with the real-arithmetic reference (preamble and data symbols, IDFT,
// cyclic prefix), tolerance 6 LSB for the fixed-point IFFT. Also checks
// out_sof/out_eos, that the preamble has two equal halves (to 2 LSB), and that every
// data symbol keeps a peak-to-average power ratio of at most 2 (3 dB, the
// point of the CCK interleaving) within a quantisation margin. The output
// is taken with random stalls.
module tb_cck_ofdm_tx;
  import cck_pkg::*;
  import cck_ref_pkg::*;
  localparam int N = 64, NSYM = 4, M = N / 8, SL = N + N / 4;

  logic clk = 0, rst_n = 0, start, busy, data_valid, data_ready, out_valid, out_ready, out_sof, out_eos;
  qphase_t data_phase [4];
  cplx_t out_data;
  int checks = 0, failures = 0;

  cck_ofdm_tx dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  int    codes [][4];
  real   exr [$], exi [$];
  cplx_t got [$];
  bit    sof_q [$], eos_q [$];

  // producer of codewords: offers codeword number `taken` while any is left
  int taken = 0;
  always @(negedge clk) begin
    data_valid = (taken < codes.size());
    if (taken < codes.size()) for (int k = 0; k < 4; k++) data_phase[k] = qphase_t'(codes[taken][k]);
  end
  always @(posedge clk) if (data_valid && data_ready) taken++;

  // consumer with random stalls
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    got.push_back(out_data);
    sof_q.push_back(out_sof);
    eos_q.push_back(out_eos);
  end

  initial begin
    real br [], bi [], xr [], xi [];
    int  cw [][4];
    real pk, avg, p;
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      codes = new[M * NSYM];
      taken = 0;
      foreach (codes[i]) for (int k = 0; k < 4; k++) codes[i][k] = $urandom_range(0, 3);
      got.delete(); sof_q.delete(); eos_q.delete(); exr.delete(); exi.delete();
      preamble_bins(N, 8192.0, br, bi);
      symbol(N, br, bi, xr, xi);
      foreach (xr[t]) begin exr.push_back(xr[t]); exi.push_back(xi[t]); end
      for (int s = 0; s < NSYM; s++) begin
        cw = new[M];
        for (int r = 0; r < M; r++) cw[r] = codes[s * M + r];
        data_bins(N, cw, 16384.0, br, bi);
        symbol(N, br, bi, xr, xi);
        foreach (xr[t]) begin exr.push_back(xr[t]); exi.push_back(xi[t]); end
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (got.size() < (NSYM + 1) * SL) @(negedge clk);
      repeat (20) @(negedge clk);
      checks++;
      if (got.size() != (NSYM + 1) * SL) begin failures++; $display("FAIL %0d samples", got.size()); end
      foreach (exr[t]) begin
        checks++;
        if (rabs(got[t].re - exr[t]) > 6.0 || rabs(got[t].im - exi[t]) > 6.0 ||
            sof_q[t] != (t == 0) || eos_q[t] != (t % SL == SL - 1)) begin
          failures++;
          $display("FAIL frame %0d sample %0d got %0d,%0d exp %0.1f,%0.1f", f, t, got[t].re, got[t].im, exr[t], exi[t]);
        end
      end
      // preamble halves equal (after the prefix)
      for (int t = N / 4; t < N / 4 + N / 2; t++) begin
        checks++;
        if (rabs(got[t].re - got[t + N / 2].re) > 2.0 || rabs(got[t].im - got[t + N / 2].im) > 2.0) begin failures++; $display("FAIL preamble not periodic at %0d", t); end
      end
      // PAPR of every data symbol (prefix excluded)
      for (int s = 1; s <= NSYM; s++) begin
        pk = 0; avg = 0;
        for (int t = s * SL + N / 4; t < (s + 1) * SL; t++) begin
          p = real'(got[t].re) * got[t].re + real'(got[t].im) * got[t].im;
          avg += p / N;
          if (p > pk) pk = p;
        end
        checks++;
        if (pk / avg > 2.1) begin failures++; $display("FAIL symbol %0d PAPR %f", s, pk / avg); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
