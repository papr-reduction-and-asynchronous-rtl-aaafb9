// Twiddle-factor table: w = e^{-j*2*pi*idx/N} in Q1.14, i.e. cos(2*pi*idx/N)
// and -sin(2*pi*idx/N), each rounded to the nearest code and clipped to
// 16383 so that +1.0 stays representable next to -1.0. The table is
// computed at elaboration from $cos/$sin and read combinationally (a ROM of
// N complex words). Callers conjugate the word for an inverse transform.
module twiddle_rom
  import cck_pkg::*;
#(
  parameter int N = 64
) (
  input  logic [$clog2(N)-1:0] idx,
  output cplx_t                w
);
  typedef sample_t tab_t [N];

  function automatic sample_t q14(input real v);
    int k;
    k = $rtoi($floor(v * 16384.0 + 0.5));
    if (k > 16383)  k = 16383;
    if (k < -16384) k = -16384;
    return sample_t'(k);
  endfunction

  // quadrature = 0: cos table, quadrature = 1: -sin table
  function automatic tab_t make_table(input bit quadrature);
    tab_t t;
    real  ang;
    for (int i = 0; i < N; i++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(i) / real'(N);
      t[i] = quadrature ? q14(-$sin(ang)) : q14($cos(ang));
    end
    return t;
  endfunction

  localparam tab_t COS_TAB  = make_table(1'b0);
  localparam tab_t NSIN_TAB = make_table(1'b1);

  assign w.re = COS_TAB[idx];
  assign w.im = NSIN_TAB[idx];
endmodule
