// Self-checking testbench for cp_remove (N = 64, CP = 16).
// Streams a frame of 4 symbols of 80 samples (sample value = its index in
// the frame) with gaps in in_valid and a randomly toggling out_ready, and
// checks that exactly samples 16..79 of each symbol come out, in order,
// with out_last on the 64th; then a partial symbol is cut short by a new
// frame, to show that in_sof restarts the count.
module tb_cp_remove;
  import cck_pkg::*;
  localparam int N = 64, CP = 16;
  logic clk = 0, rst_n = 0, in_valid, in_ready, in_sof, out_valid, out_ready, out_last;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;

  cp_remove dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int expect_q[$];
  bit last_q[$];
  int nout = 0;

  task automatic expect_frame(input int nsamp, input int base);
    for (int k = 0; k < nsamp; k++)
      if (k % (N + CP) >= CP) begin
        expect_q.push_back(base + k);
        last_q.push_back(k % (N + CP) == N + CP - 1);
      end
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int e;
    bit l;
    checks++;
    e = expect_q.pop_front();
    l = last_q.pop_front();
    if (int'(out_data.re) != e || out_last != l) begin
      failures++;
      $display("FAIL got %0d expected %0d", out_data.re, e);
    end
    nout++;
  end

  task automatic send_frame(input int nsamp, input int base);
    for (int i = 0; i < nsamp; ) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_sof   = in_valid && (i == 0);
      in_data.re = sample_t'(base + i);
      in_data.im = '0;
      out_ready  = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (in_valid && in_ready) begin
        i++;
      end
    end
    @(negedge clk);
    in_valid = 0; in_sof = 0;
  endtask

  initial begin
    in_valid = 0; in_sof = 0; out_ready = 0; in_data = '0;
    expect_frame(4 * (N + CP), 0);
    expect_frame(30, 2000);           // a partial symbol, then a new frame
    expect_frame(2 * (N + CP), 1000);
    repeat (2) @(posedge clk);
    rst_n = 1;
    send_frame(4 * (N + CP), 0);
    send_frame(30, 2000);
    send_frame(2 * (N + CP), 1000);
    repeat (3) @(posedge clk);
    checks++;
    if (expect_q.size() != 0) begin failures++; $display("FAIL %0d samples missing", expect_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
