// Polyphase interpolating filter bank: P paths, T taps per path.
//
// This is the synthesis-side polyphase filter of the channelizer in the
// form that was built and measured on its own: the prototype low-pass
// h(n), n = 0 .. P*T-1, is split into P polyphase components
// e_k(t) = h(k + P*t). Every low-rate input sample x enters a T-deep delay
// line; then P output samples follow on P consecutive clocks,
//     y_k = sum_{t=0}^{T-1} h(k + P*t) * x(n - t),   k = 0 .. P-1,
// which is the input up-sampled by P and filtered by h, one output per
// clock. A phase counter k picks the coefficient set, so only T
// multipliers exist (12 for the default 64 x 12 = 768 coefficients).
//
// The prototype is a Kaiser-windowed sinc with its zeros every P samples
// (a Nyquist filter): h(n) = sinc((n - C)/P) * I0(beta*sqrt(1-((n-C)/C)^2))
// / I0(beta) for n = 0 .. 2C, C = (P*T-2)/2 = 383, and h(P*T-1) = 0, so
// 767 non-zero taps padded to 768. Coefficients are Q1.14, computed at
// elaboration. Because of the sinc zeros, path P-1 reproduces the input
// delayed by T/2-1 samples, and every path has unit gain at DC.
//
// Interface: in_valid/in_ready accept one real Q1.14 sample; in_ready is
// high when idle and on the last output clock, so inputs can come every P
// clocks. out_valid is high for the P clocks after an accepted input, with
// out_phase = k and out_data = y_k (rounded half-up, saturated).
//
// Following the document: 64 paths, 12 taps per path, 768 Q1.14
// coefficients of a Kaiser-window design held in a look-up table, one
// output per clock, input rate at most 1/64 of the clock, coefficients
// indexed by a counter, 12 multipliers. This design's own choices: the
// cutoff (Nyquist, 1/P), beta = 0.1102*(80-8.7) for the document's 80 dB
// stop band, the handshake and the synchronous active-low reset.
module polyphase_fb
  import cck_pkg::*;
#(
  parameter int  P           = 64,
  parameter int  T           = 12,
  parameter real KAISER_BETA = 7.857
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  sample_t            in_data,
  output logic               out_valid,
  output sample_t            out_data,
  output logic [$clog2(P)-1:0] out_phase
);
  localparam int L = P * T;

  typedef sample_t coef_t [L];

  function automatic coef_t make_coefs();
    coef_t h;
    for (int n = 0; n < L; n++) h[n] = proto_coef(n, L, P, KAISER_BETA);
    return h;
  endfunction

  localparam coef_t H = make_coefs();

  sample_t               line [T];
  logic [$clog2(P)-1:0]  ph;
  logic                  busy;

  assign in_ready  = !busy || (ph == ($clog2(P))'(P - 1));
  assign out_valid = busy;
  assign out_phase = ph;

  // T multipliers, coefficient set chosen by the phase counter
  always_comb begin
    logic signed [63:0] acc;
    acc = '0;
    for (int t = 0; t < T; t++)
      acc += 64'(H[int'(ph) + P * t]) * 64'(line[t]);
    out_data = sat16(round_shift(acc, FRAC));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      ph   <= '0;
      for (int t = 0; t < T; t++) line[t] <= '0;
    end else if (in_valid && in_ready) begin
      line[0] <= in_data;
      for (int t = 1; t < T; t++) line[t] <= line[t-1];
      busy <= 1'b1;
      ph   <= '0;
    end else if (busy) begin
      ph <= ph + 1'b1;
      if (ph == ($clog2(P))'(P - 1)) busy <= 1'b0;
    end
  end
endmodule
