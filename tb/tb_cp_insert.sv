// Self-checking testbench for cp_insert (N = 64, CP = 16).
// Sends random symbols, takes the output with a randomly toggling
// out_ready, and checks that every symbol comes out as its last 16 samples
// followed by all 64, with out_first/out_last on the right samples.
module tb_cp_insert;
  import cck_pkg::*;
  localparam int N = 64, CP = 16;
  logic clk = 0, rst_n = 0, in_valid, in_ready, out_valid, out_ready, out_first, out_last;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;

  cp_insert dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t sym [N];
  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 5; s++) begin
      for (int n = 0; n < N; n++) begin
        sym[n].re = sample_t'($urandom);
        sym[n].im = sample_t'($urandom);
      end
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        in_valid = 1; in_data = sym[n];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      in_valid = 0;
      for (int k = 0; k < N + CP; ) begin
        out_ready = ($urandom_range(0, 3) != 0);
        #1;
        if (out_valid && out_ready) begin
          checks++;
          if (out_data != sym[k < CP ? N - CP + k : k - CP] || out_first != (k == 0) ||
              out_last != (k == N + CP - 1)) begin
            failures++;
            $display("FAIL symbol %0d sample %0d", s, k);
          end
          k++;
        end
        @(negedge clk);
      end
      out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
