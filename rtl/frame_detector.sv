// Frame detector for a preamble made of two identical halves.
//
// The received signal r is correlated with itself delayed by D samples
// (the length of one short preamble), and its energy is measured over the
// same window:
//     P(n) = sum_{m=0}^{D-1} r(n-m) * conj(r(n-m-D))
//     R(n) = sum_{m=0}^{D-1} |r(n-m)|^2
// Over a periodic preamble P(n) equals R(n) in magnitude, over data or
// noise it is much smaller. A frame is present while the normalised
// metric |P|^2 / R^2 exceeds 1/2, tested without a divider as
// 2*|P|^2 > R^2. Both sums are running sums: each new sample adds one term
// and the term that leaves the window is subtracted, so the cost is two
// complex products per sample and a 2*D-sample delay line.
//
// Interface: in_valid/in_data (no backpressure). `present` is the metric
// decision registered with the sample that made it; `detect` pulses for
// one clock when `present` rises. R = 0 (silence) never detects.
//
// Following the document: delay of one short preamble (32 samples), the
// cross-correlation normalised by the energy and a 0.5 threshold. This
// design's own choices: the squared form of the metric and full-precision
// accumulators.
module frame_detector
  import cck_pkg::*;
#(
  parameter int D = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  present,
  output logic  detect
);
  cplx_t dl [2*D];                       // dl[0] = r(n-1) ... dl[2D-1] = r(n-2D)
  logic signed [47:0] p_re, p_im, e_acc;

  typedef struct packed {
    logic signed [47:0] re;
    logic signed [47:0] im;
  } wide_t;

  function automatic wide_t cmul_conj(input cplx_t a, input cplx_t b);
    wide_t r;
    r.re = 48'(a.re) * 48'(b.re) + 48'(a.im) * 48'(b.im);
    r.im = 48'(a.im) * 48'(b.re) - 48'(a.re) * 48'(b.im);
    return r;
  endfunction

  wide_t add_t, sub_t;
  logic signed [47:0] e_add, e_sub, p_re_n, p_im_n, e_n;
  logic               hit;
  always_comb begin
    logic signed [95:0] pp, rr;
    add_t  = cmul_conj(in_data, dl[D-1]);       // r(n) r*(n-D)
    sub_t  = cmul_conj(dl[D-1], dl[2*D-1]);     // r(n-D) r*(n-2D)
    e_add  = 48'(in_data.re) * 48'(in_data.re) + 48'(in_data.im) * 48'(in_data.im);
    e_sub  = 48'(dl[D-1].re) * 48'(dl[D-1].re) + 48'(dl[D-1].im) * 48'(dl[D-1].im);
    p_re_n = p_re + add_t.re - sub_t.re;
    p_im_n = p_im + add_t.im - sub_t.im;
    e_n    = e_acc + e_add - e_sub;
    pp     = 96'(p_re_n) * 96'(p_re_n) + 96'(p_im_n) * 96'(p_im_n);
    rr     = 96'(e_n) * 96'(e_n);
    hit    = (e_n > 0) && ((pp <<< 1) > rr);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 2 * D; i++) dl[i] <= '0;
      p_re    <= '0;
      p_im    <= '0;
      e_acc   <= '0;
      present <= 1'b0;
      detect  <= 1'b0;
    end else begin
      detect <= 1'b0;
      if (in_valid) begin
        dl[0] <= in_data;
        for (int i = 1; i < 2 * D; i++) dl[i] <= dl[i-1];
        p_re    <= p_re_n;
        p_im    <= p_im_n;
        e_acc   <= e_n;
        present <= hit;
        detect  <= hit && !present;
      end
    end
  end
endmodule
