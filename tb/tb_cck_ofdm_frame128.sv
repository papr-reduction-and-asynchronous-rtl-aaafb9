// Workload testbench: one full frame at the document's OFDM size.
// cck_ofdm_tx and cck_ofdm_rx are built with 128-point symbols (16 CCK
// codewords per symbol, 32-sample cyclic prefix) and 50 data symbols per
// frame, and connected back to back. One frame of 800 random codewords is
// sent. Checks: every decoded codeword equals the sent one, in order; the
// frame detector fires exactly once, during the preamble; every data
// symbol (prefix excluded) has a peak-to-average power ratio of at most
// 2.1, the 3 dB bound of a single CCK codeword; the receiver reports 63
// channel estimates, each 1.0 within 64 LSB over the ideal link; every
// symbol is N + N/4 = 160 samples long.
module tb_cck_ofdm_frame128;
  import cck_pkg::*;
  localparam int N = 128, NSYM = 50, M = N / 8, SL = N + N / 4;

  logic clk = 0, rst_n = 0;
  logic start, busy, data_valid, data_ready;
  qphase_t data_phase [4];
  logic bb_valid, bb_ready, bb_sof, bb_eos;
  cplx_t bb_data;
  logic detect, out_valid, est_valid;
  qphase_t out_phase [4];
  cplx_t est_data;
  logic [6:0] est_bin;
  int checks = 0, failures = 0;

  cck_ofdm_tx #(.N(N), .NSYM(NSYM)) u_tx (
    .clk, .rst_n, .start, .busy, .data_valid, .data_ready, .data_phase,
    .out_valid(bb_valid), .out_ready(bb_ready), .out_data(bb_data), .out_sof(bb_sof), .out_eos(bb_eos));
  cck_ofdm_rx #(.N(N)) u_rx (
    .clk, .rst_n, .in_valid(bb_valid), .in_ready(bb_ready), .in_data(bb_data), .in_sof(bb_sof),
    .detect, .out_valid, .out_phase, .est_valid, .est_data, .est_bin);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  int codes [M * NSYM][4];
  int taken = 0, ndec = 0, ndet = 0, nest = 0, nsamp = 0, sym = 0, det_at = -1;
  real pw [$];

  always @(negedge clk) begin
    data_valid = (taken < M * NSYM);
    if (taken < M * NSYM) for (int k = 0; k < 4; k++) data_phase[k] = qphase_t'(codes[taken][k]);
  end

  always @(posedge clk) if (rst_n) begin
    if (data_valid && data_ready) taken++;
    if (bb_valid && bb_ready) begin
      nsamp++;
      pw.push_back(real'(bb_data.re) ** 2 + real'(bb_data.im) ** 2);
      if (bb_eos) begin
        checks++;
        if (pw.size() != SL) begin failures++; $display("FAIL symbol %0d has %0d samples", sym, pw.size()); end
        if (sym > 0) begin
          automatic real pk = 0.0, avg = 0.0;
          for (int t = N / 4; t < pw.size(); t++) begin
            avg += pw[t] / N;
            if (pw[t] > pk) pk = pw[t];
          end
          checks++;
          if (pk / avg > 2.1) begin failures++; $display("FAIL symbol %0d PAPR %f", sym, pk / avg); end
        end
        pw.delete();
        sym++;
      end
    end
    if (out_valid) begin
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (ndec >= M * NSYM || int'(out_phase[k]) != codes[ndec][k]) begin
          failures++;
          if (failures < 10) $display("FAIL codeword %0d phase %0d got %0d", ndec, k + 1, out_phase[k]);
        end
      end
      ndec++;
    end
    if (detect) begin ndet++; det_at = nsamp; end
    if (est_valid) begin
      checks++;
      if (rabs(est_data.re - 16384.0) > 64.0 || rabs(est_data.im) > 64.0) begin
        failures++;
        $display("FAIL channel estimate bin %0d = %h", est_bin, est_data);
      end
      nest++;
    end
  end

  initial begin
    foreach (codes[i]) for (int k = 0; k < 4; k++) codes[i][k] = $urandom_range(0, 3);
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (ndec < M * NSYM) @(negedge clk);
    repeat (100) @(negedge clk);
    checks++;
    if (sym != NSYM + 1) begin failures++; $display("FAIL %0d symbols sent", sym); end
    checks++;
    if (ndet != 1 || det_at < SL / 2 || det_at > SL) begin failures++; $display("FAIL %0d detections, at sample %0d", ndet, det_at); end
    checks++;
    if (nest != N / 2 - 1) begin failures++; $display("FAIL %0d channel estimates", nest); end
    $display("frame of %0d symbols, %0d codewords decoded, %0d samples", sym, ndec, nsamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
