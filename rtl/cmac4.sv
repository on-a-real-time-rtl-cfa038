// cmac4: four-term complex multiply-accumulate, the arithmetic core of the
// complex matrix multiplier.
//
// y = a[0]*b[0] + a[1]*b[1] + a[2]*b[2] + a[3]*b[3] for complex Q12.20
// operands. All eight real products are kept at full 64-bit precision and
// summed exactly; the sum is shifted right by the 20 fraction bits (rounding
// toward minus infinity) and saturated to 32 bits once, at the end. Saturation
// follows the design's fixed-point rule; doing it once on the exact sum, and
// truncating, are this design's choices.
//
// Timing: one result per cycle, latency one cycle (y and y_valid are
// registered; y_valid follows in_valid).
module cmac4
  import bss_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  cfx_t a [MDIM],
  input  cfx_t b [MDIM],
  output logic y_valid,
  output cfx_t y
);

  logic signed [71:0] acc_re, acc_im;

  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int k = 0; k < MDIM; k++) begin
      acc_re = acc_re + 72'(a[k].re * b[k].re) - 72'(a[k].im * b[k].im);
      acc_im = acc_im + 72'(a[k].re * b[k].im) + 72'(a[k].im * b[k].re);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y       <= '0;
    end else begin
      y_valid <= in_valid;
      if (in_valid) begin
        y.re <= sat_fx(acc_re >>> FW);
        y.im <= sat_fx(acc_im >>> FW);
      end
    end
  end

endmodule
