// tb_block_throughput: runs the hardware part of one full processing block
// (four microphones, 256 samples: forward FFTs, filtering of all 256 bins
// with per-bin 4x4 unmixing matrices, inverse FFT of the target output) on
// two accelerator configurations side by side: one FFT/IFFT unit with one
// matrix multiplier, and the default two FFT/IFFT units with five matrix
// multipliers. It checks the results of both, reports the cycles of each
// phase and the block rate at a 184.8 MHz clock, and checks that the larger
// configuration is faster and that both fit the 16 ms a 256-sample block
// lasts at 16 kHz sampling. It also prints how far the fixed-point outputs
// are from the double-precision model. Host-software time (the weight adaptation) is
// not included.
module tb_block_throughput;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int f1, m1, i1, c1, e1, f2, m2, i2, c2, e2;
  logic d1, d2;
  real y1, t1e, y2, t2e;
  int checks = 0, failures = 0;

  bss_block_run #(.N_FFT(1), .N_CMM(1), .SEED(7)) run_small (
    .clk, .rst_n, .cyc_fft(f1), .cyc_filter(m1), .cyc_ifft(i1),
    .checks(c1), .failures(e1), .max_err_y(y1), .max_err_t(t1e), .finished(d1));
  bss_block_run #(.N_FFT(2), .N_CMM(5), .SEED(7)) run_full (
    .clk, .rst_n, .cyc_fft(f2), .cyc_filter(m2), .cyc_ifft(i2),
    .checks(c2), .failures(e2), .max_err_y(y2), .max_err_t(t2e), .finished(d2));

  initial begin
    #20ms;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + 1, e1 + e2 + 1);
    $finish;
  end

  initial begin
    localparam real FCLK = 184.8e6;
    localparam int  BUDGET = 2956800;   // 16 ms at 184.8 MHz
    int t1, t2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d1 && d2);
    t1 = f1 + m1 + i1;
    t2 = f2 + m2 + i2;
    $display("1 FFT + 1 CMM: fft %0d, filter %0d, ifft %0d cycles; total %0d = %.1f samples/s",
             f1, m1, i1, t1, 256.0 * FCLK / t1);
    $display("2 FFT + 5 CMM: fft %0d, filter %0d, ifft %0d cycles; total %0d = %.1f samples/s",
             f2, m2, i2, t2, 256.0 * FCLK / t2);
    $display("largest deviation from double precision (LSB of Q12.20): Y %.1f / %.1f, time output %.1f / %.1f",
             y1, y2, t1e, t2e);
    checks = c1 + c2 + 3;
    failures = e1 + e2;
    if (!(t2 < t1)) failures++;
    if (t1 > BUDGET) failures++;
    if (t2 > BUDGET) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
