// Polyphase complementary code keying (CCK) encoder, 8 chips per codeword.
//
// Four QPSK phases phi1..phi4 (in quarter turns) select one of 256
// complementary codewords. Chip i (i = 0..7, bits i[2:0]) has the phase
//   theta_i = phi4 + i[0]*phi1 + i[1]*phi2 + i[2]*phi3 + pi*CCK_SIGN[i],
// the three-stage structure of a complementary code generator in which each
// stage doubles the code length and adds its own phase rotator, and phi4
// is common to every chip. With QPSK phases every chip is one of
// {+A, +jA, -A, -jA}, so no multiplier is needed: the phase sum is taken
// modulo 4 and mapped to a point. Eight input bits (four QPSK symbols)
// become eight QPSK chips: code rate 1/2.
//
// Interface: in_valid with in_phase[0..3] = phi1..phi4; one clock later
// out_valid with out_chip[0..7] (Q1.14, amplitude AMP) and their phase
// indices out_theta[0..7]. No backpressure.
//
// Following the document: the chip/phase matrix (phi4 common, three
// stages), QPSK rotators and code rate 1/2. This design's own choices: the
// sign pattern (see cck_pkg), the amplitude and the one-clock register.
module cck_encoder
  import cck_pkg::*;
#(
  parameter sample_t AMP = sample_t'(ONE)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  qphase_t in_phase  [4],
  output logic    out_valid,
  output cplx_t   out_chip  [CCK_LEN],
  output qphase_t out_theta [CCK_LEN]
);
  qphase_t theta [CCK_LEN];

  always_comb begin
    for (int i = 0; i < CCK_LEN; i++) begin
      theta[i] = in_phase[3];
      if (i[0]) theta[i] += in_phase[0];
      if (i[1]) theta[i] += in_phase[1];
      if (i[2]) theta[i] += in_phase[2];
      if (CCK_SIGN[i]) theta[i] += 2'd2;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < CCK_LEN; i++) begin
        out_chip[i]  <= '0;
        out_theta[i] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < CCK_LEN; i++) begin
          out_chip[i]  <= qpsk_point(theta[i], AMP);
          out_theta[i] <= theta[i];
        end
    end
  end
endmodule
