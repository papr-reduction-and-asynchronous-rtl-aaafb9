// Cyclic prefix insertion for one OFDM symbol.
//
// N time samples of an IFFT output are stored, then sent as CP + N
// samples: first the last CP samples of the symbol (addresses N-CP..N-1),
// then the whole symbol (0..N-1). The copied tail turns the channel's
// linear convolution into a circular one and acts as a guard interval.
//
// Interface: in_valid/in_ready take N samples; out_valid/out_ready send
// N+CP samples, out_first marks the first sample of the prefix and
// out_last the last sample of the symbol. One buffer: a new symbol is
// accepted after the previous one has been sent.
//
// Following the document: a prefix of one quarter of the symbol. This
// design's own choices: the single buffer and the handshake.
module cp_insert
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
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  output logic  out_first,
  output logic  out_last
);
  localparam int CW = $clog2(N + CP);

  cplx_t           mem [N];
  logic            sending;
  logic [CW-1:0]   cnt;
  logic [$clog2(N)-1:0] rd;

  always_comb begin
    if (int'(cnt) < CP) rd = ($clog2(N))'(int'(cnt) + N - CP);
    else                rd = ($clog2(N))'(int'(cnt) - CP);
  end

  assign in_ready  = !sending;
  assign out_valid = sending;
  assign out_data  = mem[rd];
  assign out_first = sending && (cnt == '0);
  assign out_last  = sending && (cnt == CW'(N + CP - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sending <= 1'b0;
      cnt     <= '0;
    end else if (!sending) begin
      if (in_valid) begin
        mem[cnt[$clog2(N)-1:0]] <= in_data;
        cnt <= cnt + 1'b1;
        if (cnt == CW'(N - 1)) begin
          sending <= 1'b1;
          cnt     <= '0;
        end
      end
    end else if (out_ready) begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(N + CP - 1)) begin
        sending <= 1'b0;
        cnt     <= '0;
      end
    end
  end
endmodule
