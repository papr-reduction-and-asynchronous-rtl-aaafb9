// M/2 analysis channelizer (non-maximally decimated DFT filter bank).
//
// Splits a composite signal into M channels spaced fs/M apart, producing a
// frame of M channel samples every D = M/2 input samples (each channel is
// sampled at twice its spacing). For frame m, taken after input sample
// t = (m+1)*D - 1:
//     Y_k[m] = (-1)^{k*m} / M * sum_l h[l] * x[t - l] * e^{+j*2*pi*k*l/M}
// with h the M*T-tap prototype (Kaiser-windowed sinc from
// cck_pkg::proto_coef). Channel k is the band around +k*fs/M brought to
// DC; the factor (-1)^{k*m} is the phase correction that makes every
// channel a time-invariant filter (a tone at the centre of channel k gives
// the constant (-1)^k * e^{-j*2*pi*k/M} times its amplitude).
//
// Implementation: inputs are written into a circular buffer of the last
// 2^ceil(log2(M*T)) samples (the serpentine shift of the M x T polyphase
// matrix: D new samples per frame move the data half a column). Once D new
// samples are in, the M polyphase path outputs
//     w[p] = sum_{q=0}^{T-1} h[q*M + p] * x[t - q*M - p]
// are formed one per clock with T parallel real-by-complex products and
// fed straight into fft_serial (IFFT mode, 1/2 per stage, so the 1/M
// above). On odd frames the paths are fed with a circular offset of D
// (the circular buffer of the phase correction). Input is held off
// (in_ready low) during the M feed clocks and while the previous transform
// has not yet left the IFFT.
//
// Interface: in_valid/in_ready/in_data take the composite, one sample per
// handshake; out_valid/out_ready/out_data/out_chan/out_last give each
// frame's M channel samples in channel order (out_last on channel M-1).
//
// Following the document: 64 channels, a 64 x 12 polyphase matrix of a
// 768-tap prototype, decimation by M/2 with the serpentine input shift,
// the circular phase-correcting buffer and an IFFT. This design's own
// choices: the Kaiser prototype, computing the paths serially into a
// serial IFFT, the input buffer as a circular memory, and the scaling.
module nmdfb_analysis
  import cck_pkg::*;
#(
  parameter int  M           = 64,
  parameter int  T           = 12,
  parameter real KAISER_BETA = 7.857
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  cplx_t                in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output cplx_t                out_data,
  output logic [$clog2(M)-1:0] out_chan,
  output logic                 out_last
);
  localparam int D    = M / 2;
  localparam int L    = M * T;
  localparam int LOGM = $clog2(M);
  localparam int LOGD = $clog2(D);
  localparam int LOGX = $clog2(L);
  localparam int XB   = 1 << LOGX;

  typedef sample_t coef_t [L];
  function automatic coef_t make_coefs();
    coef_t h;
    for (int n = 0; n < L; n++) h[n] = proto_coef(n, L, M, KAISER_BETA);
    return h;
  endfunction
  localparam coef_t H = make_coefs();

  cplx_t           xbuf [XB];
  logic [LOGX-1:0] wr;          // index of the next input sample
  logic [LOGD-1:0] cnt;         // new samples in this frame
  logic            feed;        // feeding the M path outputs
  logic [LOGM-1:0] pf;          // feed position
  logic            odd;         // parity of the frame being fed

  logic f_ready, f_busy;
  cplx_t w;

  assign in_ready = !feed;

  // path output for feed position pf (path p = pf + D on odd frames)
  always_comb begin
    logic signed [63:0] acc_re, acc_im;
    logic [LOGM-1:0]    p;
    logic [LOGX-1:0]    a;
    acc_re = '0;
    acc_im = '0;
    p = pf + (odd ? LOGM'(D) : LOGM'(0));
    for (int q = 0; q < T; q++) begin
      // newest sample is wr - 1
      a = wr - LOGX'(1) - LOGX'(q * M) - LOGX'(p);
      acc_re += 64'(H[q * M + int'(p)]) * 64'(xbuf[a].re);
      acc_im += 64'(H[q * M + int'(p)]) * 64'(xbuf[a].im);
    end
    w.re = sat16(round_shift(acc_re, FRAC));
    w.im = sat16(round_shift(acc_im, FRAC));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < XB; i++) xbuf[i] <= '0;
      wr   <= '0;
      cnt  <= '0;
      feed <= 1'b0;
      pf   <= '0;
      odd  <= 1'b0;
    end else if (!feed) begin
      if (in_valid) begin
        xbuf[wr] <= in_data;
        wr       <= wr + 1'b1;
        cnt      <= cnt + 1'b1;
        if (cnt == LOGD'(D - 1)) feed <= 1'b1;
      end
    end else if (f_ready) begin
      pf <= pf + 1'b1;
      if (pf == LOGM'(M - 1)) begin
        feed <= 1'b0;
        odd  <= !odd;
      end
    end
  end

  fft_serial #(.N(M)) u_ifft (
    .clk, .rst_n,
    .inverse  (1'b1),
    .scale    (1'b1),
    .in_valid (feed),
    .in_ready (f_ready),
    .in_data  (w),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_data (out_data),
    .out_last (out_last),
    .busy     (f_busy)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_chan <= '0;
    else if (out_valid && out_ready) out_chan <= out_chan + 1'b1;
  end

  // the IFFT never computes while paths are being fed into it, and the
  // channel index runs in step with the frame boundaries
  a_feed_load: assert property (@(posedge clk) disable iff (!rst_n)
    feed && f_busy |-> !f_ready);
  a_chan: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && out_last |-> out_chan == LOGM'(M - 1));
endmodule
