// tb_cmm: loads random 4x4 complex matrices A and B, runs the multiplier
// and compares all 16 elements of C with an exact integer reference
// (sum of products floored by 2^20 and clamped to 32 bits). Checks the
// start-to-done latency of 18 cycles, that writes are ignored while busy,
// and the fill of B from a model FFT buffer holding random microphone
// vectors per bin.
module tb_cmm;
  import bss_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fx_t real_inA = 0, imag_inA = 0, real_inB = 0, imag_inB = 0;
  logic [1:0] rowA_in = 0, colA_in = 0, rowB_in = 0, colB_in = 0, rowC = 0, colC = 0;
  logic weA = 0, weB = 0, start = 0, src_buf = 0, rd = 0;
  logic [7:0] bin_base = 0, buf_bin;
  logic buf_req, buf_gnt, buf_rvalid = 0;
  cfx_t buf_rdata [MDIM];
  fx_t REAL_OUT, IMAG_OUT;
  logic busy, done;
  int checks = 0, failures = 0;

  cfx_t A [MDIM][MDIM], B [MDIM][MDIM];
  cfx_t bin_vec [256][MDIM];

  cmm dut (.*);

  // model buffer: grants immediately, data one cycle later
  assign buf_gnt = buf_req;
  always_ff @(posedge clk) begin
    buf_rvalid <= buf_gnt;
    if (buf_gnt) for (int m = 0; m < MDIM; m++) buf_rdata[m] <= bin_vec[buf_bin][m];
  end

  function automatic fx_t clamp(input logic signed [127:0] s);
    logic signed [127:0] q = s >>> 20;
    if (q > 128'sd2147483647) return 32'sh7fffffff;
    if (q < -128'sd2147483648) return 32'sh80000000;
    return q[31:0];
  endfunction

  function automatic fx_t rnd();
    fx_t v = $urandom;
    return v >>> 8;   // |v| < 8.0
  endfunction

  task automatic load(input bit matB, input int r, input int c, input cfx_t v);
    @(negedge clk);
    if (!matB) begin weA = 1; rowA_in = 2'(r); colA_in = 2'(c); real_inA = v.re; imag_inA = v.im; end
    else       begin weB = 1; rowB_in = 2'(r); colB_in = 2'(c); real_inB = v.re; imag_inB = v.im; end
    @(negedge clk);
    weA = 0; weB = 0;
  endtask

  task automatic run_and_check(input bit use_buf);
    int cyc = 0;
    @(negedge clk);
    start = 1; src_buf = use_buf;
    @(negedge clk);
    start = 0;
    // a write while busy must be ignored
    weA = 1; rowA_in = 0; colA_in = 0; real_inA = 32'h7777; imag_inA = 32'h7777;
    @(negedge clk);
    weA = 0;
    cyc = 2;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    checks++;
    if (!done) failures++;
    if (!use_buf) begin
      checks++;
      if (cyc != 18) begin failures++; $display("latency %0d", cyc); end
    end
    if (use_buf)
      for (int c = 0; c < MDIM; c++) for (int r = 0; r < MDIM; r++) B[r][c] = bin_vec[bin_base + 8'(c)][r];
    for (int i = 0; i < MDIM; i++)
      for (int j = 0; j < MDIM; j++) begin
        logic signed [127:0] sr = 0, si = 0;
        for (int k = 0; k < MDIM; k++) begin
          sr += 128'(A[i][k].re) * 128'(B[k][j].re) - 128'(A[i][k].im) * 128'(B[k][j].im);
          si += 128'(A[i][k].re) * 128'(B[k][j].im) + 128'(A[i][k].im) * 128'(B[k][j].re);
        end
        @(negedge clk);
        rd = 1; rowC = 2'(i); colC = 2'(j);
        @(negedge clk);
        rd = 0;
        checks++;
        if (REAL_OUT !== clamp(sr) || IMAG_OUT !== clamp(si)) begin
          failures++;
          if (failures < 5) $display("C[%0d][%0d] got %h %h exp %h %h", i, j, REAL_OUT, IMAG_OUT, clamp(sr), clamp(si));
        end
      end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 256; b++) for (int m = 0; m < MDIM; m++) bin_vec[b][m] = '{re: rnd(), im: rnd()};
    for (int m = 0; m < MDIM; m++) buf_rdata[m] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      for (int r = 0; r < MDIM; r++)
        for (int c = 0; c < MDIM; c++) begin
          A[r][c] = '{re: rnd(), im: rnd()};
          B[r][c] = '{re: rnd(), im: rnd()};
          if (t % 3 == 2) begin   // large values to reach saturation
            A[r][c].re = $urandom; B[r][c].im = $urandom;
          end
          load(0, r, c, A[r][c]);
          load(1, r, c, B[r][c]);
        end
      bin_base = 8'($urandom);
      run_and_check(t % 4 == 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
