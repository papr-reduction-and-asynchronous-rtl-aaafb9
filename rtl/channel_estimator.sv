// Frequency-domain channel estimator.
//
// The receiver knows the preamble bins X[k] it is sent. After the channel,
// the FFT of the received preamble is Y[k] = H[k]*X[k], so the channel
// response on every preamble bin is H[k] = Y[k] / X[k]. The preamble bins
// are QPSK points of one amplitude PRE_AMP, so the division reduces to a
// quarter-turn rotation by the known phase and a constant gain:
//     H[k] = Y[k] * e^{-j*pi/2*ph(k)} * (1 / PRE_AMP)
// Preamble bins are every STEP-th bin except DC (STEP = 1: every bin, a
// long preamble; STEP = 2: the even bins of the short preamble that
// cck_ofdm_tx sends), and bin STEP*m carries the phase m*(m+1)/2 mod 4
// quarter turns, the pattern cck_ofdm_tx uses.
//
// Interface: in_valid/in_data/in_last take the N FFT bins of the preamble
// symbol in natural order (in_last on bin N-1). For every preamble bin
// out_valid is high for one clock, one clock after the bin arrived, with
// out_data = H[k] in Q1.14 (1.0 = unit channel gain) and out_bin = k.
// Other bins give no output.
//
// Following the document: the estimate is the received preamble
// multiplied by the reciprocal of the known one. This design's own
// choices: the preamble pattern and amplitude (shared with the
// transmitter), which bins carry it, and the streaming output.
module channel_estimator
  import cck_pkg::*;
#(
  parameter int      N       = 64,
  parameter int      STEP    = 2,
  parameter sample_t PRE_AMP = 16'sd8192
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cplx_t                in_data,
  input  logic                 in_last,
  output logic                 out_valid,
  output cplx_t                out_data,
  output logic [$clog2(N)-1:0] out_bin
);
  localparam int LOGN = $clog2(N);
  // 1 / PRE_AMP in Q(FRAC) is ONE*ONE/PRE_AMP
  localparam longint GAIN = (longint'(ONE) * longint'(ONE)) / longint'(PRE_AMP);

  logic [LOGN-1:0] k;
  logic            pilot;
  qphase_t         ph;
  cplx_t           r;

  always_comb begin
    int m;
    m     = int'(k) / STEP;
    pilot = (int'(k) % STEP == 0) && (k != '0);
    ph    = qphase_t'(((m * (m + 1)) / 2) % 4);
    r     = rot_q(in_data, qphase_t'(-ph));   // multiply by conj(X)/|X|
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k         <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_bin   <= '0;
    end else begin
      out_valid <= in_valid && pilot;
      if (in_valid) begin
        k           <= in_last ? '0 : k + 1'b1;
        out_bin     <= k;
        out_data.re <= sat16(round_shift(64'(r.re) * 64'(GAIN), FRAC));
        out_data.im <= sat16(round_shift(64'(r.im) * 64'(GAIN), FRAC));
      end
    end
  end
endmodule
