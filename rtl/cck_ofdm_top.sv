// CCK-OFDM transceiver with a 64-path polyphase interpolator.
//
// Transmit side: cck_ofdm_tx turns QPSK phases into frames of CCK-coded,
// frequency-interleaved OFDM symbols (IFFT on the serial radix-2 FFT, N/4
// cyclic prefix). Each baseband sample is then interpolated by P = 64 in
// two polyphase_fb filter banks, one for I and one for Q, which is the
// synthesis polyphase filter of the channelizer for the channel at DC: the
// filter banks take one baseband sample every 64 clocks and produce 64
// interpolated samples, one per clock, so they pace the transmitter
// through its valid/ready output. The baseband stream is also brought out
// (tx_bb_*) with a valid on every sample the filter banks accept.
//
// Receive side: cck_ofdm_rx takes a baseband stream with a start-of-frame
// strobe, detects the preamble, removes the prefixes, runs the FFT,
// de-interleaves and decodes the CCK codewords back to QPSK phases. It
// also estimates the channel on the preamble bins (rx_est_*).
//
// Channelizers: next to the transceiver stand the 64-channel M/2
// synthesis channelizer (nmdfb_synth), which multiplexes 64 channel
// streams into one composite at 32 samples per channel frame, and the
// matching analysis channelizer (nmdfb_analysis), which splits a composite
// back into 64 channels. They multiplex independent (asynchronous)
// packets onto separate channels; ch_* and an_* bring them out on their
// own ports. The channel chosen by an_sel is also passed through the
// order-37 channel_prefilter (pf_*), which removes the neighbouring
// channels' band edges from it.
//
// The sides share only the clock and reset; a loopback connects tx_bb_*
// to rx_in_* and ch_mux_* to an_in_* outside. All data are complex Q1.14.
//
// Following the document: the blocks and their order in the transmitter
// and receiver, the 64-point FFT and the 64 x 12 polyphase filter bank
// built in fixed point, the M/2 channelizers with 64 channels. This
// design's own choices: the framing signals, the side-by-side ports,
// N = 64 for the OFDM symbol (the implemented FFT size) and the use of
// the filter bank as the interpolator of one channel.
module cck_ofdm_top
  import cck_pkg::*;
#(
  parameter int N    = 64,
  parameter int NSYM = 4,
  parameter int P    = 64,
  parameter int T    = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  // transmit control and data
  input  logic             tx_start,
  output logic             tx_busy,
  input  logic             tx_data_valid,
  output logic             tx_data_ready,
  input  qphase_t          tx_data_phase [4],
  // transmit baseband (one sample per P clocks)
  output logic             tx_bb_valid,
  output cplx_t            tx_bb_data,
  output logic             tx_bb_sof,
  // transmit interpolated output (one sample per clock)
  output logic             tx_if_valid,
  output cplx_t            tx_if_data,
  output logic [$clog2(P)-1:0] tx_if_phase,
  // receive
  input  logic             rx_in_valid,
  output logic             rx_in_ready,
  input  cplx_t            rx_in_data,
  input  logic             rx_in_sof,
  output logic             rx_detect,
  output logic             rx_out_valid,
  output qphase_t          rx_out_phase [4],
  output logic             rx_est_valid,
  output cplx_t            rx_est_data,
  output logic [$clog2(N)-1:0] rx_est_bin,
  // synthesis channelizer: channel frames in, composite out
  input  logic             ch_in_valid,
  output logic             ch_in_ready,
  input  cplx_t            ch_in_data,
  output logic             ch_mux_valid,
  output cplx_t            ch_mux_data,
  // analysis channelizer: composite in, channel frames out
  input  logic             an_in_valid,
  output logic             an_in_ready,
  input  cplx_t            an_in_data,
  output logic             an_out_valid,
  input  logic             an_out_ready,
  output cplx_t            an_out_data,
  output logic [$clog2(P)-1:0] an_out_chan,
  output logic             an_out_last,
  // pre-filtered analysis channel an_sel
  input  logic [$clog2(P)-1:0] an_sel,
  output logic             pf_valid,
  output cplx_t            pf_data
);
  logic  bb_valid, bb_ready, bb_sof, bb_eos;
  cplx_t bb_data;

  cck_ofdm_tx #(.N(N), .NSYM(NSYM)) u_tx (
    .clk, .rst_n,
    .start     (tx_start),
    .busy      (tx_busy),
    .data_valid(tx_data_valid),
    .data_ready(tx_data_ready),
    .data_phase(tx_data_phase),
    .out_valid (bb_valid),
    .out_ready (bb_ready),
    .out_data  (bb_data),
    .out_sof   (bb_sof),
    .out_eos   (bb_eos)
  );

  logic rdy_i, rdy_q, val_q;
  logic [$clog2(P)-1:0] ph_q;

  polyphase_fb #(.P(P), .T(T)) u_pfb_i (
    .clk, .rst_n,
    .in_valid (bb_valid),
    .in_ready (rdy_i),
    .in_data  (bb_data.re),
    .out_valid(tx_if_valid),
    .out_data (tx_if_data.re),
    .out_phase(tx_if_phase)
  );

  polyphase_fb #(.P(P), .T(T)) u_pfb_q (
    .clk, .rst_n,
    .in_valid (bb_valid),
    .in_ready (rdy_q),
    .in_data  (bb_data.im),
    .out_valid(val_q),
    .out_data (tx_if_data.im),
    .out_phase(ph_q)
  );

  assign bb_ready    = rdy_i && rdy_q;
  assign tx_bb_valid = bb_valid && bb_ready;
  assign tx_bb_data  = bb_data;
  assign tx_bb_sof   = bb_sof;

  // The I and Q filter banks run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rdy_i == rdy_q && tx_if_valid == val_q && tx_if_phase == ph_q);

  cck_ofdm_rx #(.N(N)) u_rx (
    .clk, .rst_n,
    .in_valid (rx_in_valid),
    .in_ready (rx_in_ready),
    .in_data  (rx_in_data),
    .in_sof   (rx_in_sof),
    .detect   (rx_detect),
    .out_valid(rx_out_valid),
    .out_phase(rx_out_phase),
    .est_valid(rx_est_valid),
    .est_data (rx_est_data),
    .est_bin  (rx_est_bin)
  );

  nmdfb_synth #(.M(P), .T(T)) u_syn (
    .clk, .rst_n,
    .in_valid (ch_in_valid),
    .in_ready (ch_in_ready),
    .in_data  (ch_in_data),
    .out_valid(ch_mux_valid),
    .out_data (ch_mux_data)
  );

  nmdfb_analysis #(.M(P), .T(T)) u_ana (
    .clk, .rst_n,
    .in_valid (an_in_valid),
    .in_ready (an_in_ready),
    .in_data  (an_in_data),
    .out_valid(an_out_valid),
    .out_ready(an_out_ready),
    .out_data (an_out_data),
    .out_chan (an_out_chan),
    .out_last (an_out_last)
  );

  channel_prefilter u_pf (
    .clk, .rst_n,
    .in_valid (an_out_valid && an_out_ready && an_out_chan == an_sel),
    .in_data  (an_out_data),
    .out_valid(pf_valid),
    .out_data (pf_data)
  );
endmodule
