// M/2 synthesis channelizer (non-maximally decimated DFT filter bank).
//
// M channel samples X_k[m] (k = 0..M-1, one frame per channel sampling
// instant m) are combined into one composite signal with channel k centred
// at k*fs/M, with an up-sampling of only D = M/2 per frame, so each
// channel is carried at twice its spacing. The composite is
//     y[n] = 1/2 * sum_m g[n - m*D] * v_m[n mod M],
//     v_m[p] = 1/M * sum_k X_k[m] * e^{+j*2*pi*k*p/M}      (IFFT)
// for the prototype g of length M*T (Kaiser-windowed sinc, cutoff half the
// channel spacing, from cck_pkg::proto_coef). Writing n = m*D + d:
//     y[m*D + d] = 1/2 * sum_{j=0}^{2T-1} g[j*D + d] * v_{m-j}[d + D*(m mod 2)]
// i.e. the filter taps j*D + d belong to the two polyphase paths d and
// d + D of the M x T polyphase matrix (the two commutator positions, at 0
// and at the middle), and the IFFT output is read with a circular offset
// of D on odd frames (the phase-correcting circular buffer), which keeps
// every channel phase-continuous in absolute time.
//
// Implementation: the serial fft_serial (IFFT mode, 1/2 per stage) turns
// each input frame into v_m, which is written into a history of the last
// 2T frames. Then D output samples follow on D consecutive clocks, each
// computed with 2T parallel real-by-complex multiply pairs, rounded
// half-up and saturated. The factor 1/2 undoes the D-fold (rather than
// M-fold) up-sampling gain of the prototype.
//
// Interface: in_valid/in_ready/in_data take one frame of M channel
// samples in channel order; out_valid/out_data give D composite samples
// per frame, one per clock (no backpressure). A single active channel k
// with constant X gives y[n] = X/M * e^{j*2*pi*k*n/M} once the filter has
// filled.
//
// Following the document: 64 channels, a 64-point IFFT, a 64 x 12
// polyphase matrix of a 768-tap prototype, an output rate of M/2 samples
// per input frame delivered by two commutators (positions 0 and M/2) and
// a circular phase-correcting buffer. This design's own choices: the
// Kaiser prototype shared with the analysis side (the document designs the
// synthesis prototype with a modified Remez method), the scaling, and the
// frame history storage.
module nmdfb_synth
  import cck_pkg::*;
#(
  parameter int  M           = 64,
  parameter int  T           = 12,
  parameter real KAISER_BETA = 7.857
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);
  localparam int D    = M / 2;
  localparam int J    = 2 * T;          // frames that contribute to an output
  localparam int L    = M * T;
  localparam int LOGM = $clog2(M);
  localparam int LOGD = $clog2(D);
  localparam int LOGJ = $clog2(J);

  typedef sample_t coef_t [L];
  function automatic coef_t make_coefs();
    coef_t h;
    for (int n = 0; n < L; n++) h[n] = proto_coef(n, L, M, KAISER_BETA);
    return h;
  endfunction
  localparam coef_t G = make_coefs();

  // ---------------- IFFT ----------------
  logic  f_valid, f_last, f_busy;
  cplx_t f_data;
  fft_serial #(.N(M)) u_ifft (
    .clk, .rst_n,
    .inverse  (1'b1),
    .scale    (1'b1),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_data  (in_data),
    .out_valid(f_valid),
    .out_ready(1'b1),
    .out_data (f_data),
    .out_last (f_last),
    .busy     (f_busy)
  );

  // ---------------- frame history ----------------
  cplx_t           hist [J][M];
  logic [LOGJ-1:0] wr_slot;     // slot being written / newest frame
  logic [LOGM-1:0] wr_p;
  logic            odd;         // parity of the newest frame index
  logic            run;         // output phase in progress
  logic [LOGD-1:0] d;

  // ---------------- output MAC: 2T paths in parallel ----------------
  always_comb begin
    logic signed [63:0] acc_re, acc_im;
    logic [LOGJ-1:0]    slot;
    logic [LOGM-1:0]    p;
    cplx_t              v;
    acc_re = '0;
    acc_im = '0;
    p = LOGM'(d) + (odd ? LOGM'(D) : LOGM'(0));
    for (int j = 0; j < J; j++) begin
      slot = LOGJ'((int'(wr_slot) - j + J) % J);
      v    = hist[slot][p];
      acc_re += 64'(G[j * D + int'(d)]) * 64'(v.re);
      acc_im += 64'(G[j * D + int'(d)]) * 64'(v.im);
    end
    out_data.re = sat16(round_shift(acc_re, FRAC + 1));
    out_data.im = sat16(round_shift(acc_im, FRAC + 1));
  end

  assign out_valid = run;

  // the D outputs of a frame only overlap the loading of the next frame
  // (D clocks < M load clocks), never its transform or drain
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    run |-> !f_valid && !f_busy);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < J; j++)
        for (int k = 0; k < M; k++) hist[j][k] <= '0;
      wr_slot <= '0;
      wr_p    <= '0;
      odd     <= 1'b1;
      run     <= 1'b0;
      d       <= '0;
    end else begin
      if (f_valid) begin
        // the first word of a frame opens the next slot
        if (wr_p == '0) begin
          wr_slot <= (int'(wr_slot) == J - 1) ? '0 : wr_slot + 1'b1;
          hist[(int'(wr_slot) == J - 1) ? '0 : wr_slot + 1'b1][0] <= f_data;
          odd <= !odd;
        end else begin
          hist[wr_slot][wr_p] <= f_data;
        end
        wr_p <= wr_p + 1'b1;
        if (f_last) begin
          run <= 1'b1;
          d   <= '0;
        end
      end else if (run) begin
        d <= d + 1'b1;
        if (d == LOGD'(D - 1)) run <= 1'b0;
      end
    end
  end
endmodule
