// Self-checking testbench for cck_encoder.
// For all 256 phase combinations it checks each chip against the code
// equation (computed here separately), that every chip is a unit QPSK
// point, the one-clock latency, and the property the code exists for:
// the 8 chips placed on adjacent sub-carriers give a time signal (here
// evaluated at 16 times the sub-carrier spacing) whose peak-to-average
// power ratio does not exceed 2.
module tb_cck_encoder;
  import cck_pkg::*;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  qphase_t in_phase [4];
  cplx_t   out_chip [8];
  qphase_t out_theta [8];
  int checks = 0, failures = 0;

  cck_encoder dut (.*);
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
    real pk, avg, xr, xi, a, ang;
    int  th;
    in_valid = 0;
    for (int k = 0; k < 4; k++) in_phase[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 256; c++) begin
      @(negedge clk);
      in_valid = 1;
      for (int k = 0; k < 4; k++) in_phase[k] = qphase_t'(c >> (2 * k));
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no out_valid"); end
      for (int i = 0; i < 8; i++) begin
        th = (int'(in_phase[3]) + (i % 2) * int'(in_phase[0]) + ((i / 2) % 2) * int'(in_phase[1])
              + (i / 4) * int'(in_phase[2]) + 2 * SIGNS[i]) % 4;
        checks++;
        if (int'(out_theta[i]) != th ||
            out_chip[i].re != sample_t'($rtoi(16384.0 * $cos(th * 1.5707963267948966) + (th == 2 ? -0.5 : 0.5))) ||
            out_chip[i].im != sample_t'($rtoi(16384.0 * $sin(th * 1.5707963267948966) + (th == 3 ? -0.5 : 0.5)))) begin
          failures++;
          $display("FAIL code %0d chip %0d theta %0d exp %0d (%0d,%0d)", c, i, out_theta[i], th,
                   out_chip[i].re, out_chip[i].im);
        end
      end
      // PAPR of the chips on sub-carriers 0..7, time axis oversampled by 16
      pk = 0; avg = 0;
      for (int n = 0; n < 128; n++) begin
        xr = 0; xi = 0;
        for (int i = 0; i < 8; i++) begin
          a   = 2.0 * 3.14159265358979 * i * n / 128.0;
          xr += out_chip[i].re * $cos(a) - out_chip[i].im * $sin(a);
          xi += out_chip[i].re * $sin(a) + out_chip[i].im * $cos(a);
        end
        ang = xr * xr + xi * xi;
        avg += ang / 128.0;
        if (ang > pk) pk = ang;
      end
      checks++;
      if (pk / avg > 2.0001) begin failures++; $display("FAIL code %0d PAPR %f", c, pk / avg); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
