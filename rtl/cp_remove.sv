// Cyclic prefix removal at the receiver.
//
// The received stream is cut into symbols of CP + N samples, counted from
// a start-of-frame strobe; the first CP samples of each symbol are dropped
// and the N remaining ones are passed to the FFT.
//
// Interface: in_valid/in_ready/in_data with in_sof on the first sample of
// a frame (it restarts the count); out_valid/out_ready/out_data with
// out_last on the last sample of each symbol. Dropped samples are always
// accepted; kept ones wait for out_ready. Combinational, no latency.
//
// Following the document: the receiver discards the cyclic prefix before
// the FFT. This design's own choice: symbol timing from an external
// strobe.
module cp_remove
  import cck_pkg::*;
#(
  parameter int N  = 64,
  parameter int CP = N / 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  input  logic  in_sof,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  output logic  out_last
);
  localparam int CW = $clog2(N + CP);

  logic [CW-1:0] cnt, pos;

  assign pos       = in_sof ? '0 : cnt;
  assign out_valid = in_valid && (int'(pos) >= CP);
  assign in_ready  = (int'(pos) < CP) || out_ready;
  assign out_data  = in_data;
  assign out_last  = out_valid && (pos == CW'(N + CP - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else if (in_valid && in_ready)
      cnt <= (pos == CW'(N + CP - 1)) ? '0 : pos + 1'b1;
  end
endmodule
