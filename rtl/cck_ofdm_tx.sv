// CCK-OFDM transmitter: one frame = a short-preamble symbol followed by
// NSYM data symbols, each with a cyclic prefix.
//
// Data path of a data symbol:
//   QPSK phases -> cck_encoder (8 chips per codeword)
//     -> cck_interleaver (M = N/8 codewords interleaved in frequency)
//     -> fft_serial in IFFT mode with 1/2 scaling per stage
//     -> cp_insert (N/4 prefix) -> out
// The preamble symbol bypasses encoder and interleaver: QPSK points on the
// even bins 2, 4, .., N-2 (zero on DC and odd bins), so its IFFT is two
// identical halves of N/2 samples, the repetition the receiver's frame
// detector looks for. Preamble bin 2m carries the phase m*(m+1)/2 mod 4
// (quarter turns) with amplitude PRE_AMP.
//
// Interface: `start` (while idle) begins a frame. data_valid/data_ready
// take one codeword (four QPSK phases) at a time, M*NSYM codewords per
// frame. out_valid/out_ready/out_data carry the baseband samples; out_sof
// marks the first sample of the frame (first prefix sample of the
// preamble) and out_eos the last sample of every symbol. `busy` is high
// from start until the last codeword has been taken.
//
// Following the document: preamble made of repeated short preambles by
// zero packing in frequency, CCK coding with interleaving in frequency
// ahead of one IFFT, a quarter-symbol cyclic prefix. This design's own
// choices: the preamble phases and amplitude, one preamble symbol per
// frame, N = 64 (the implemented FFT size) and the framing signals.
module cck_ofdm_tx
  import cck_pkg::*;
#(
  parameter int      N       = 64,
  parameter int      NSYM    = 4,
  parameter sample_t PRE_AMP = 16'sd8192
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  output logic    busy,
  input  logic    data_valid,
  output logic    data_ready,
  input  qphase_t data_phase [4],
  output logic    out_valid,
  input  logic    out_ready,
  output cplx_t   out_data,
  output logic    out_sof,
  output logic    out_eos
);
  localparam int M    = N / CCK_LEN;
  localparam int LOGN = $clog2(N);
  localparam int NCW  = M * NSYM;            // codewords per frame

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DATA} state_t;
  state_t state;

  logic [LOGN-1:0]          pre_k;
  logic [$clog2(NCW+1)-1:0] cw_cnt;
  logic [$clog2(NSYM+2)-1:0] sym_out;          // symbols sent in this frame

  // ---------------- encoder and chip serializer ----------------
  logic    enc_valid, ser_busy;
  cplx_t   enc_chip  [CCK_LEN];
  qphase_t enc_theta [CCK_LEN];
  cplx_t   ser_chip  [CCK_LEN];
  logic [$clog2(CCK_LEN)-1:0] ser_idx;
  logic    enc_fire;

  assign data_ready = (state == S_DATA) && !ser_busy && !enc_valid;
  assign enc_fire   = data_valid && data_ready;

  cck_encoder u_enc (
    .clk, .rst_n,
    .in_valid (enc_fire),
    .in_phase (data_phase),
    .out_valid(enc_valid),
    .out_chip (enc_chip),
    .out_theta(enc_theta)
  );

  logic  il_in_valid, il_in_ready, il_out_valid, il_out_ready, il_out_last;
  cplx_t il_out_data;

  assign il_in_valid = ser_busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ser_busy <= 1'b0;
      ser_idx  <= '0;
      for (int i = 0; i < CCK_LEN; i++) ser_chip[i] <= '0;
    end else if (enc_valid) begin
      ser_chip <= enc_chip;
      ser_busy <= 1'b1;
      ser_idx  <= '0;
    end else if (ser_busy && il_in_ready) begin
      ser_idx <= ser_idx + 1'b1;
      if (ser_idx == ($clog2(CCK_LEN))'(CCK_LEN - 1)) ser_busy <= 1'b0;
    end
  end

  cck_interleaver #(.N(N), .L(CCK_LEN)) u_il (
    .clk, .rst_n,
    .deinterleave(1'b0),
    .in_valid (il_in_valid),
    .in_ready (il_in_ready),
    .in_data  (ser_chip[ser_idx]),
    .out_valid(il_out_valid),
    .out_ready(il_out_ready),
    .out_data (il_out_data),
    .out_last (il_out_last)
  );

  // ---------------- preamble bins ----------------
  cplx_t pre_bin;
  always_comb begin
    logic [LOGN-1:0] m;
    m = pre_k >> 1;
    if (pre_k[0] || pre_k == '0) pre_bin = '0;
    else pre_bin = qpsk_point(qphase_t'((m * (m + 1'b1)) >> 1), PRE_AMP);
  end

  // ---------------- IFFT and cyclic prefix ----------------
  logic  fft_in_valid, fft_in_ready, fft_out_valid, fft_out_ready, fft_out_last, fft_busy;
  cplx_t fft_in_data, fft_out_data;

  assign fft_in_valid = (state == S_PRE) ? 1'b1 : il_out_valid;
  assign fft_in_data  = (state == S_PRE) ? pre_bin : il_out_data;
  assign il_out_ready = (state != S_PRE) && fft_in_ready;

  fft_serial #(.N(N)) u_ifft (
    .clk, .rst_n,
    .inverse  (1'b1),
    .scale    (1'b1),
    .in_valid (fft_in_valid),
    .in_ready (fft_in_ready),
    .in_data  (fft_in_data),
    .out_valid(fft_out_valid),
    .out_ready(fft_out_ready),
    .out_data (fft_out_data),
    .out_last (fft_out_last),
    .busy     (fft_busy)
  );

  logic cp_first, cp_last;
  cp_insert #(.N(N), .CP(N / 4)) u_cp (
    .clk, .rst_n,
    .in_valid (fft_out_valid),
    .in_ready (fft_out_ready),
    .in_data  (fft_out_data),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_data (out_data),
    .out_first(cp_first),
    .out_last (cp_last)
  );

  assign out_sof = cp_first && (sym_out == '0);
  assign out_eos = cp_last;
  assign busy    = (state != S_IDLE);

  // ---------------- frame control ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pre_k   <= '0;
      cw_cnt  <= '0;
      sym_out <= '0;
    end else begin
      if (out_valid && out_ready && cp_last) sym_out <= sym_out + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_PRE;
          pre_k   <= '0;
          cw_cnt  <= '0;
          sym_out <= '0;
        end
        S_PRE: if (fft_in_ready) begin
          pre_k <= pre_k + 1'b1;
          if (pre_k == LOGN'(N - 1)) state <= S_DATA;
        end
        default: if (enc_fire) begin
          cw_cnt <= cw_cnt + 1'b1;
          if (cw_cnt == ($clog2(NCW+1))'(NCW - 1)) state <= S_IDLE;
        end
      endcase
    end
  end
endmodule
