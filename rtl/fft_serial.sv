// Serial radix-2 decimation-in-frequency FFT / IFFT.
//
// The transform runs in three phases under a small state machine:
//   LOAD  - N complex samples are accepted in time order (valid/ready) and
//           written to an N-word register file.
//   CALC  - log2(N) stages of N/2 butterflies, one butterfly per clock, in
//           place: a' = a + b, b' = (a - b) * W^e. For N = 64 this is
//           6 * 32 = 192 clocks. The stage counter s and butterfly counter i
//           give span = N >> (s+1), a = (i / span) * 2 * span + i % span,
//           b = a + span and twiddle exponent e = (i % span) << s.
//   DRAIN - the N results leave in natural frequency order, read from the
//           register file at bit-reversed addresses (DIF leaves them
//           bit-reversed in place).
// `inverse` (sampled with the first input sample) conjugates the twiddle
// factors, which turns the FFT into the IFFT. With `scale` set every stage
// halves its outputs, so a full transform carries the 1/N factor of the
// IDFT and cannot overflow for inputs of magnitude up to 1/sqrt(2); with
// `scale` clear the stages do not scale and results saturate.
// The butterfly keeps one guard bit on the add/subtract and the full
// product width in the complex multiply, then rounds half-up to Q1.14 and
// saturates to 16 bits.
//
// Following the document: radix 2, decimation in frequency, serial form
// with one butterfly per clock, 192 compute cycles for 64 points, Q1.14
// data, 1/2 scaling after every butterfly, rounding to nearest after the
// multiplier, IFFT by conjugated twiddles. This design's own choices: the
// valid/ready framing, the run-time `scale` switch, the register-file
// storage and the synchronous active-low reset.
//
// Latency: the first output is valid N/2*log2(N) clocks after the clock edge
// that accepts the last input; a new frame is accepted once the N outputs have
// been taken.
module fft_serial
  import cck_pkg::*;
#(
  parameter int N = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  inverse,
  input  logic  scale,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  output logic  out_last,
  output logic  busy
);
  localparam int LOGN = $clog2(N);
  localparam int HALF = N / 2;

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_DRAIN} state_t;

  state_t              state;
  cplx_t               mem [N];
  logic [LOGN-1:0]     cnt;        // load / drain address
  logic [LOGN-2:0]     bfly;       // butterfly index within a stage
  logic [$clog2(LOGN+1)-1:0] stage;
  logic                inv_q, scale_q;

  // ---------------- butterfly address generation ----------------
  logic [LOGN-1:0] ia, ib, pos, span, tw_idx;
  always_comb begin
    span   = LOGN'(N >> (stage + 1));
    pos    = LOGN'(bfly) & (span - 1'b1);
    ia     = ((LOGN'(bfly) - pos) << 1) + pos;  // group * 2 * span + pos
    ib     = ia + span;
    tw_idx = pos << stage;
  end

  cplx_t tw_rom, tw;
  twiddle_rom #(.N(N)) u_tw (.idx(tw_idx), .w(tw_rom));
  always_comb begin
    tw = tw_rom;
    if (inv_q) tw.im = sample_t'(-tw_rom.im);
  end

  // ---------------- butterfly datapath ----------------
  cplx_t a, b, na, nb;
  always_comb begin
    logic signed [16:0] sr, si, dr, di;
    logic signed [63:0] pr, pi;
    int sh_add, sh_mul;
    a  = mem[ia];
    b  = mem[ib];
    sr = 17'(a.re) + 17'(b.re);
    si = 17'(a.im) + 17'(b.im);
    dr = 17'(a.re) - 17'(b.re);
    di = 17'(a.im) - 17'(b.im);
    pr = 64'(dr) * 64'(tw.re) - 64'(di) * 64'(tw.im);
    pi = 64'(dr) * 64'(tw.im) + 64'(di) * 64'(tw.re);
    sh_add = scale_q ? 1 : 0;
    sh_mul = scale_q ? FRAC + 1 : FRAC;
    na.re = sat16(round_shift(64'(sr), sh_add));
    na.im = sat16(round_shift(64'(si), sh_add));
    nb.re = sat16(round_shift(pr, sh_mul));
    nb.im = sat16(round_shift(pi, sh_mul));
  end

  // bit reversal of the drain address
  logic [LOGN-1:0] rev;
  always_comb for (int k = 0; k < LOGN; k++) rev[k] = cnt[LOGN-1-k];

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_DRAIN);
  assign out_data  = mem[rev];
  assign out_last  = (state == S_DRAIN) && (cnt == LOGN'(N - 1));
  assign busy      = (state == S_CALC);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_LOAD;
      cnt     <= '0;
      bfly    <= '0;
      stage   <= '0;
      inv_q   <= 1'b0;
      scale_q <= 1'b1;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          mem[cnt] <= in_data;
          if (cnt == '0) begin
            inv_q   <= inverse;
            scale_q <= scale;
          end
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) begin
            state <= S_CALC;
            bfly  <= '0;
            stage <= '0;
          end
        end
        S_CALC: begin
          mem[ia] <= na;
          mem[ib] <= nb;
          bfly    <= bfly + 1'b1;
          if (bfly == (LOGN-1)'(HALF - 1)) begin
            stage <= stage + 1'b1;
            if (stage == ($clog2(LOGN+1))'(LOGN - 1)) begin
              state <= S_DRAIN;
              cnt   <= '0;
            end
          end
        end
        default: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) state <= S_LOAD;
        end
      endcase
    end
  end

  // A frame must not be accepted while the butterflies run.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !in_ready);
endmodule
