// tb_cmac4: checks the four-term complex multiply-accumulate against a
// 128-bit integer reference (floor of the exact sum over 2^20, clamped to
// 32 bits), with small operands and with full-range operands that saturate,
// and checks the one-cycle latency of y_valid.
module tb_cmac4;
  import bss_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, y_valid;
  cfx_t a [MDIM], b [MDIM], y;
  int checks = 0, failures = 0, n_sat = 0;

  cmac4 dut (.clk, .rst_n, .in_valid, .a, .b, .y_valid, .y);

  function automatic logic signed [31:0] ref_part(input logic signed [127:0] s);
    logic signed [127:0] q;
    q = s >>> 20;
    if (q > 128'sd2147483647) return 32'sh7fffffff;
    if (q < -128'sd2147483648) return 32'sh80000000;
    return q[31:0];
  endfunction

  function automatic logic signed [31:0] rnd(input bit big);
    logic signed [31:0] v;
    v = $urandom;
    return big ? v : (v >>> 9);  // small: |v| < 4.0 in Q12.20
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [127:0] sr, si;
    logic signed [31:0] er, ei;
    for (int k = 0; k < MDIM; k++) begin a[k] = '0; b[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      automatic bit big = (t % 4 == 3);
      sr = 0; si = 0;
      for (int k = 0; k < MDIM; k++) begin
        a[k].re = rnd(big); a[k].im = rnd(big);
        b[k].re = rnd(big); b[k].im = rnd(big);
        sr += 128'(a[k].re) * 128'(b[k].re) - 128'(a[k].im) * 128'(b[k].im);
        si += 128'(a[k].re) * 128'(b[k].im) + 128'(a[k].im) * 128'(b[k].re);
      end
      er = ref_part(sr); ei = ref_part(si);
      if ((sr >>> 20) != 128'(er) || (si >>> 20) != 128'(ei)) n_sat++;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!y_valid || y.re !== er || y.im !== ei) begin
        failures++;
        if (failures < 5) $display("cmac4 mismatch t=%0d got %0d %0d exp %0d %0d", t, y.re, y.im, er, ei);
      end
      @(negedge clk);
      checks++;
      if (y_valid) failures++;  // valid lasts exactly one cycle
    end
    // A known value: (1+2j)*(3-1j) = 5+5j in the first term only
    for (int k = 0; k < MDIM; k++) begin a[k] = '0; b[k] = '0; end
    a[0] = '{re: 32'sd1 <<< 20, im: 32'sd2 <<< 20};
    b[0] = '{re: 32'sd3 <<< 20, im: -(32'sd1 <<< 20)};
    in_valid = 1; @(negedge clk); in_valid = 0;
    checks++;
    if (y.re !== (32'sd5 <<< 20) || y.im !== (32'sd5 <<< 20)) failures++;
    checks++;
    if (n_sat == 0) failures++;  // saturation must have been exercised
    $display("saturated results: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
