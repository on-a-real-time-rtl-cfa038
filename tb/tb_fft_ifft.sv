// tb_fft_ifft: loads random complex frames into the 256-point unit, runs the
// forward and the inverse transform and compares every bin with a
// double-precision DFT reference (forward scaled by 1/N, inverse as the
// usual 1/N-normalised inverse DFT), within a tolerance for the per-stage
// truncation. Checks the 1024-cycle run time, the streaming output of the
// buffer mode (index, mic tag, data, back-pressure) and a round trip
// IFFT(FFT(x)) = x/N.
module tb_fft_ifft;
  import bss_pkg::*;
  localparam int N = 256;
  localparam real PI2 = 6.283185307179586;
  localparam real TOL = 24.0;   // LSBs

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr = 0, start = 0, inverse = 0, to_buf = 0, rd = 0, out_ready = 1;
  logic [AW-1:0] wr_addr = 0, rd_addr = 0;
  cfw_t wr_data = '0, rd_data, out_data;
  logic [1:0] mic = 0, out_mic;
  logic busy, done, out_valid;
  logic [7:0] out_idx;
  int checks = 0, failures = 0;

  real xr [N], xi [N], er [N], ei [N];
  cfw_t got [N];

  fft_ifft #(.N(N)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_frame();
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      wr = 1; wr_addr = AW'(n);
      wr_data = '{re: FFT_W'(int'(xr[n])), im: FFT_W'(int'(xi[n]))};
    end
    @(negedge clk); wr = 0;
    // an out-of-range address must not disturb the frame
    wr = 1; wr_addr = AW'(N + 3); wr_data = '{re: 24'h7fffff, im: 24'h7fffff};
    @(negedge clk); wr = 0;
  endtask

  task automatic reference(input bit inv);
    for (int k = 0; k < N; k++) begin
      real sr = 0, si = 0;
      for (int n = 0; n < N; n++) begin
        real a = PI2 * ((n * k) % N) / N;
        real c = $cos(a), s = inv ? $sin(a) : -$sin(a);
        sr += xr[n] * c - xi[n] * s;
        si += xr[n] * s + xi[n] * c;
      end
      er[k] = sr / N; ei[k] = si / N;
    end
  endtask

  task automatic run(input bit inv, input bit buf_mode, input bit stall);
    int cyc = 0, nstream = 0;
    @(negedge clk);
    start = 1; inverse = inv; to_buf = buf_mode; mic = 2'($urandom);
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 5000) begin
      if (stall) out_ready = ($urandom_range(1, 0) == 1);
      if (out_valid) begin
        checks++;
        if (out_idx != 8'(nstream) || out_mic != mic) begin failures++; if (failures < 4) $display("stream idx %0d exp %0d mic %0d exp %0d", out_idx, nstream, out_mic, mic); end
        if (out_ready) begin got[nstream] = out_data; nstream++; end
      end
      @(negedge clk); cyc++;
    end
    out_ready = 1;
    checks++;
    if (!done) failures++;
    if (!buf_mode) begin
      checks++;
      if (cyc != N / 2 * 8 + 1) begin failures++; $display("run time %0d", cyc); end
    end else begin
      checks++;
      if (nstream != N) failures++;
    end
  endtask

  task automatic compare(input bit from_stream);
    for (int k = 0; k < N; k++) begin
      cfw_t v;
      if (from_stream) v = got[k];
      else begin
        @(negedge clk); rd = 1; rd_addr = AW'(k);
        @(negedge clk); rd = 0;
        v = rd_data;
      end
      checks++;
      if ((real'(v.re) - er[k]) > TOL || (er[k] - real'(v.re)) > TOL ||
          (real'(v.im) - ei[k]) > TOL || (ei[k] - real'(v.im)) > TOL) begin
        failures++;
        if (failures < 6) $display("bin %0d got %0d %0d exp %f %f", k, v.re, v.im, er[k], ei[k]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = real'($signed($urandom) >>> 9);
        xi[n] = (t == 0) ? 0.0 : real'($signed($urandom) >>> 9);
      end
      if (t == 3) for (int n = 0; n < N; n++) begin   // a pure tone
        xr[n] = 4000000.0 * $cos(PI2 * 5 * n / N); xi[n] = 0.0;
      end
      load_frame();
      reference(t == 1);
      run(t == 1, t == 2, t == 2);
      compare(t == 2);
    end
    // round trip: FFT then IFFT of the result, in place
    for (int n = 0; n < N; n++) begin xr[n] = real'($signed($urandom) >>> 9); xi[n] = 0.0; end
    load_frame();
    run(0, 0, 0);
    for (int k = 0; k < N; k++) begin
      @(negedge clk); rd = 1; rd_addr = AW'(k);
      @(negedge clk); rd = 0; got[k] = rd_data;
    end
    for (int k = 0; k < N; k++) begin
      @(negedge clk); wr = 1; wr_addr = AW'(k); wr_data = got[k];
    end
    @(negedge clk); wr = 0;
    for (int n = 0; n < N; n++) begin er[n] = xr[n] / N; ei[n] = 0.0; end
    run(1, 0, 0);
    compare(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
