// Self-checking testbench for cck_decoder.
// Codewords for all 256 phase combinations are built here from the code
// equation, scaled, rotated by a small common angle and disturbed by
// random noise, then decoded; the four decoded phases must equal the sent
// ones, two clocks after the chips. Runs at a large and at a small chip
// amplitude.
module tb_cck_decoder;
  import cck_pkg::*;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  cplx_t   in_chip [8];
  qphase_t out_phase [4];
  int checks = 0, failures = 0;

  cck_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int SIGNS [8] = '{0, 0, 1, 1, 1, 0, 1, 0};

  initial begin
    real amp, rot, ang, noise;
    int  th;
    in_valid = 0;
    for (int i = 0; i < 8; i++) in_chip[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      amp   = pass == 0 ? 12000.0 : 600.0;
      noise = amp / 8.0;
      for (int c = 0; c < 256; c++) begin
        @(negedge clk);
        in_valid = 1;
        rot = (real'($urandom_range(0, 200)) - 100.0) / 1000.0;   // +-0.1 rad
        for (int i = 0; i < 8; i++) begin
          th = ((c >> 6) & 3) + (i % 2) * (c & 3) + ((i / 2) % 2) * ((c >> 2) & 3)
               + (i / 4) * ((c >> 4) & 3) + 2 * SIGNS[i];
          ang = th * 1.5707963267948966 + rot;
          in_chip[i].re = sample_t'($rtoi(amp * $cos(ang) + noise * (real'($urandom_range(0, 200)) - 100.0) / 100.0));
          in_chip[i].im = sample_t'($rtoi(amp * $sin(ang) + noise * (real'($urandom_range(0, 200)) - 100.0) / 100.0));
        end
        @(negedge clk);
        in_valid = 0;
        @(negedge clk);
        checks++;
        if (!out_valid) begin failures++; $display("FAIL latency"); end
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (int'(out_phase[k]) != ((c >> (2 * k)) & 3)) begin
            failures++;
            $display("FAIL code %0d phase %0d got %0d", c, k + 1, out_phase[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
