// CCK decoder for the 8-chip polyphase complementary code of cck_encoder.
//
// The known pi inversions (CCK_SIGN) are undone first, leaving
// z_i = g * e^{j(phi4 + i[0]*phi1 + i[1]*phi2 + i[2]*phi3)} for some gain g.
// Each of phi1..phi3 is then the phase difference between the four chip
// pairs that differ only in that phase, averaged by summing the conjugate
// products (the matched-filter decoding that runs the encoder stages
// backwards):
//   c1 = z1 z0* + z3 z2* + z5 z4* + z7 z6*         -> phi1
//   c2 = z2 z0* + z3 z1* + z6 z4* + z7 z5*         -> phi2
//   c3 = z4 z0* + z5 z1* + z6 z2* + z7 z3*         -> phi3
// The common phase comes from the four chips that carry phi4 alone or with
// one decoded phase, after removing that phase:
//   c4 = z0 + z1 e^{-j phi1} + z2 e^{-j phi2} + z4 e^{-j phi3}   -> phi4
// Every decision picks the nearest QPSK point {0, pi/2, pi, 3pi/2}, i.e.
// the axis closest to the correlation.
//
// Interface: in_valid with 8 chips (any amplitude that keeps the products
// inside 64 bits); two clocks later out_valid with out_phase[0..3] =
// phi1..phi4 in quarter turns. No backpressure.
//
// Following the document: pairwise conjugate products averaged over four
// carrier pairs for phi1..phi3, and the four-term estimate of the common
// phase. This design's own choices: chip pairs numbered to match the
// encoder, removal of the sign pattern before correlating, and a hard
// decision on the common phase (no differential detection, the receiver
// assumes an equalised channel).
module cck_decoder
  import cck_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  cplx_t   in_chip   [CCK_LEN],
  output logic    out_valid,
  output qphase_t out_phase [4]
);
  typedef struct packed {
    logic signed [63:0] re;
    logic signed [63:0] im;
  } wide_t;

  // nearest QPSK axis of a wide complex value
  function automatic qphase_t decide(input wide_t v);
    logic signed [63:0] ar, ai;
    ar = v.re < 0 ? -v.re : v.re;
    ai = v.im < 0 ? -v.im : v.im;
    if (ar >= ai) return v.re >= 0 ? 2'd0 : 2'd2;
    else          return v.im >= 0 ? 2'd1 : 2'd3;
  endfunction

  // a * conj(b), full precision
  function automatic wide_t cmul_conj(input cplx_t a, input cplx_t b);
    wide_t r;
    r.re = 64'(a.re) * 64'(b.re) + 64'(a.im) * 64'(b.im);
    r.im = 64'(a.im) * 64'(b.re) - 64'(a.re) * 64'(b.im);
    return r;
  endfunction

  function automatic wide_t wadd(input wide_t a, input wide_t b);
    wide_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic wide_t widen(input cplx_t a);
    wide_t r;
    r.re = 64'(a.re);
    r.im = 64'(a.im);
    return r;
  endfunction

  // ---- stage 1: remove signs, pairwise correlations, decide phi1..phi3
  cplx_t   z [CCK_LEN];
  wide_t   corr [3];
  always_comb begin
    for (int i = 0; i < CCK_LEN; i++)
      z[i] = CCK_SIGN[i] ? rot_q(in_chip[i], 2'd2) : in_chip[i];
    for (int k = 0; k < 3; k++) begin
      corr[k] = '0;
      for (int i = 0; i < CCK_LEN; i++)
        if (i[k]) corr[k] = wadd(corr[k], cmul_conj(z[i], z[i ^ (1 << k)]));
    end
  end

  logic    v1;
  qphase_t ph1 [3];
  cplx_t   zc  [4];   // z0, z1, z2, z4
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      for (int k = 0; k < 3; k++) ph1[k] <= '0;
      for (int k = 0; k < 4; k++) zc[k]  <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < 3; k++) ph1[k] <= decide(corr[k]);
        zc[0] <= z[0];
        zc[1] <= z[1];
        zc[2] <= z[2];
        zc[3] <= z[4];
      end
    end
  end

  // ---- stage 2: common phase
  wide_t c4;
  always_comb begin
    c4 = widen(zc[0]);
    for (int k = 0; k < 3; k++)
      c4 = wadd(c4, widen(rot_q(zc[k+1], qphase_t'(-ph1[k]))));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 4; k++) out_phase[k] <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        for (int k = 0; k < 3; k++) out_phase[k] <= ph1[k];
        out_phase[3] <= decide(c4);
      end
    end
  end
endmodule
