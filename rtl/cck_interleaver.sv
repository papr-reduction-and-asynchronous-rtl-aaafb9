// Frequency-domain interleaver for CCK-OFDM (and its receive dual).
//
// Several short CCK codewords placed side by side in one OFDM symbol
// overlap in time after the IFFT and the peak-to-average power ratio grows
// with their number. Instead, the M = N/L codewords C_r (r = 0..M-1, L
// chips each) are each replicated over the whole band, every 2*pi/M, and
// codeword r is rotated by e^{-j*2*pi*k*r/N}, a time shift of r samples:
//     X[k] = (1/M) * sum_{r=0}^{M-1} C_r[k mod L] * e^{-j*2*pi*k*r/N}
// After an N-point IFFT the codewords sit on interleaved time samples
// (codeword r on samples r, r+M, r+2M, ...) and never overlap, so every
// OFDM symbol keeps the 3 dB peak-to-average ratio of a single codeword.
// With `deinterleave` set the unit computes the receive-side inverse on
// the N FFT bins X:
//     C_r[k0] = sum_{q=0}^{M-1} X[q*L + k0] * e^{+j*2*pi*(q*L + k0)*r/N}
//
// Implementation: N words are loaded (valid/ready, codeword r chip i at
// address r*L + i on transmit, bin order on receive), then N output words
// are computed with one complex multiply-accumulate per clock (N*M clocks,
// 512 for the defaults) into an output buffer, which is then drained in
// order (valid/ready). Products are kept at full precision; the sum is
// rounded half-up to Q1.14 and saturated.
//
// Following the document: replication every 2*pi/M with a phase rotation
// per group in frequency, overlapped before a single IFFT. This design's
// own choices: M = N/L groups (the whole band), the sequential MAC and the
// receive-side dual.
module cck_interleaver
  import cck_pkg::*;
#(
  parameter int N = 64,
  parameter int L = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  deinterleave,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  output logic  out_last
);
  localparam int M    = N / L;
  localparam int LOGN = $clog2(N);
  localparam int LOGM = $clog2(M);
  localparam int LOGL = $clog2(L);

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_DRAIN} state_t;

  state_t          state;
  cplx_t           mem_in  [N];
  cplx_t           mem_out [N];
  logic [LOGN-1:0] cnt;    // load / drain address, output index during CALC
  logic [LOGM-1:0] b;      // summation index
  logic            deint_q;
  logic signed [63:0] acc_re, acc_im;

  // operand address and twiddle exponent
  logic [LOGN-1:0] rd_addr, exp_idx;
  always_comb begin
    logic [LOGL-1:0] k0;
    logic [LOGM-1:0] r;
    k0 = cnt[LOGL-1:0];
    r  = cnt[LOGN-1:LOGL];
    if (!deint_q) begin
      rd_addr = {b, k0};                       // C_b[k mod L]
      exp_idx = LOGN'(cnt * b);                // k * r mod N
    end else begin
      rd_addr = {b, k0};                       // X[b*L + k0]
      exp_idx = LOGN'({b, k0} * r);            // (q*L + k0) * r mod N
    end
  end

  cplx_t tw_rom, tw;
  twiddle_rom #(.N(N)) u_tw (.idx(exp_idx), .w(tw_rom));
  always_comb begin
    tw = tw_rom;
    if (deint_q) tw.im = sample_t'(-tw_rom.im);
  end

  logic signed [63:0] pr, pi, sum_re, sum_im;
  always_comb begin
    cplx_t x;
    x      = mem_in[rd_addr];
    pr     = 64'(x.re) * 64'(tw.re) - 64'(x.im) * 64'(tw.im);
    pi     = 64'(x.re) * 64'(tw.im) + 64'(x.im) * 64'(tw.re);
    sum_re = acc_re + pr;
    sum_im = acc_im + pi;
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_DRAIN);
  assign out_data  = mem_out[cnt];
  assign out_last  = (state == S_DRAIN) && (cnt == LOGN'(N - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_LOAD;
      cnt     <= '0;
      b       <= '0;
      deint_q <= 1'b0;
      acc_re  <= '0;
      acc_im  <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          mem_in[cnt] <= in_data;
          if (cnt == '0) deint_q <= deinterleave;
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) begin
            state  <= S_CALC;
            b      <= '0;
            acc_re <= '0;
            acc_im <= '0;
          end
        end
        S_CALC: begin
          b <= b + 1'b1;
          if (b == LOGM'(M - 1)) begin
            mem_out[cnt].re <= sat16(round_shift(sum_re, deint_q ? FRAC : FRAC + LOGM));
            mem_out[cnt].im <= sat16(round_shift(sum_im, deint_q ? FRAC : FRAC + LOGM));
            acc_re <= '0;
            acc_im <= '0;
            cnt    <= cnt + 1'b1;
            if (cnt == LOGN'(N - 1)) state <= S_DRAIN;
          end else begin
            acc_re <= sum_re;
            acc_im <= sum_im;
          end
        end
        default: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) state <= S_LOAD;
        end
      endcase
    end
  end
endmodule
