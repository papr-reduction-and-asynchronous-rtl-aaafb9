// CCK-OFDM receiver for frames made by cck_ofdm_tx.
//
// Data path:
//   in -> frame_detector                       (preamble detection)
//   in -> cp_remove -> fft_serial (forward, unscaled)
//      -> symbol 0 of a frame (the preamble) goes to channel_estimator
//         (channel response on its even bins) and no further
//      -> cck_interleaver in de-interleave mode (back to M codewords)
//      -> 8-chip collector -> cck_decoder -> four QPSK phases per codeword
// The forward FFT runs without per-stage scaling so that it undoes the 1/N
// of the transmit IFFT; the de-interleaver undoes the 1/M of the
// interleaver, so chips return at their transmitted amplitude.
//
// Interface: in_valid/in_ready/in_data with in_sof on the first sample of
// a frame (symbol timing); `detect` pulses when the frame detector finds
// a preamble; out_valid with out_phase[0..3] = phi1..phi4 once per
// decoded codeword, in transmit order. est_valid/est_data/est_bin give
// the channel estimate H[k] (Q1.14, 1.0 = unit gain) of every preamble
// bin as the preamble leaves the FFT. The estimate is not applied: there
// is no equaliser in the data path, so the receiver assumes an ideal
// channel.
//
// Following the document: prefix removal, FFT demodulation, frame
// detection by delayed auto-correlation, channel estimation from a known
// preamble, CCK decoding by pairwise conjugate products. This design's own choices: external symbol timing,
// the receive de-interleaver and the absence of an equaliser.
module cck_ofdm_rx
  import cck_pkg::*;
#(
  parameter int      N       = 64,
  parameter sample_t PRE_AMP = 16'sd8192   // preamble bin amplitude of the transmitter
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  cplx_t   in_data,
  input  logic    in_sof,
  output logic    detect,
  output logic    out_valid,
  output qphase_t out_phase [4],
  output logic    est_valid,
  output cplx_t   est_data,
  output logic [$clog2(N)-1:0] est_bin
);
  localparam int LOGN = $clog2(N);

  // ---------------- frame detection ----------------
  logic present;
  frame_detector #(.D(N / 2)) u_det (
    .clk, .rst_n,
    .in_valid(in_valid && in_ready),
    .in_data (in_data),
    .present (present),
    .detect  (detect)
  );

  // ---------------- prefix removal and FFT ----------------
  logic  cr_valid, cr_ready, cr_last;
  cplx_t cr_data;
  cp_remove #(.N(N), .CP(N / 4)) u_cpr (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_data  (in_data),
    .in_sof   (in_sof),
    .out_valid(cr_valid),
    .out_ready(cr_ready),
    .out_data (cr_data),
    .out_last (cr_last)
  );

  logic  f_valid, f_ready, f_last, f_busy;
  cplx_t f_data;
  fft_serial #(.N(N)) u_fft (
    .clk, .rst_n,
    .inverse  (1'b0),
    .scale    (1'b0),
    .in_valid (cr_valid),
    .in_ready (cr_ready),
    .in_data  (cr_data),
    .out_valid(f_valid),
    .out_ready(f_ready),
    .out_data (f_data),
    .out_last (f_last),
    .busy     (f_busy)
  );

  // symbol 0 after in_sof is the preamble
  logic is_pre;
  always_ff @(posedge clk) begin
    if (!rst_n) is_pre <= 1'b1;
    else if (in_valid && in_ready && in_sof) is_pre <= 1'b1;
    else if (f_valid && f_ready && f_last) is_pre <= 1'b0;
  end

  // ---------------- channel estimate from the preamble ----------------
  channel_estimator #(.N(N), .STEP(2), .PRE_AMP(PRE_AMP)) u_est (
    .clk, .rst_n,
    .in_valid (f_valid && is_pre),
    .in_data  (f_data),
    .in_last  (f_last),
    .out_valid(est_valid),
    .out_data (est_data),
    .out_bin  (est_bin)
  );

  // ---------------- de-interleaver ----------------
  logic  d_in_ready, d_valid, d_last;
  cplx_t d_data;
  assign f_ready = is_pre ? 1'b1 : d_in_ready;

  cck_interleaver #(.N(N), .L(CCK_LEN)) u_dil (
    .clk, .rst_n,
    .deinterleave(1'b1),
    .in_valid (f_valid && !is_pre),
    .in_ready (d_in_ready),
    .in_data  (f_data),
    .out_valid(d_valid),
    .out_ready(1'b1),
    .out_data (d_data),
    .out_last (d_last)
  );

  // ---------------- chip collector and decoder ----------------
  cplx_t chips [CCK_LEN];
  logic [$clog2(CCK_LEN)-1:0] cidx;
  logic  dec_in_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cidx         <= '0;
      dec_in_valid <= 1'b0;
      for (int i = 0; i < CCK_LEN; i++) chips[i] <= '0;
    end else begin
      dec_in_valid <= 1'b0;
      if (d_valid) begin
        chips[cidx] <= d_data;
        cidx        <= cidx + 1'b1;
        if (cidx == ($clog2(CCK_LEN))'(CCK_LEN - 1)) dec_in_valid <= 1'b1;
      end
    end
  end

  cck_decoder u_dec (
    .clk, .rst_n,
    .in_valid (dec_in_valid),
    .in_chip  (chips),
    .out_valid(out_valid),
    .out_phase(out_phase)
  );
endmodule
