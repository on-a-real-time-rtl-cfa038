// matrix_buffer: one 4x4 complex operand matrix of the matrix multiplier
// (the "Matrix A" and "Matrix B" blocks), a real buffer and an imaginary
// buffer plus the read controller that presents one line of four elements to
// the CMAC4.
//
// Writing: single elements arrive on real_in/imag_in at (row_in, col_in)
// when we is high. A whole column can also be written in one cycle through
// colwr_* (used to fill matrix B with microphone vectors from the FFT
// buffer); a column write wins over an element write in the same cycle.
// Reading: with TRANSPOSE = 0 the read controller outputs row line_sel
// (matrix A); with TRANSPOSE = 1 it outputs column line_sel (matrix B).
// The read is combinational from registers. Reset clears the matrix.
// The split into real/imaginary buffers and a read controller follows the
// block diagram; the column write port and register storage are this
// design's choices.
module matrix_buffer
  import bss_pkg::*;
#(
  parameter bit TRANSPOSE = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [1:0] row_in,
  input  logic [1:0] col_in,
  input  fx_t        real_in,
  input  fx_t        imag_in,
  input  logic       colwr_en,
  input  logic [1:0] colwr_idx,
  input  cfx_t       colwr_data [MDIM],
  input  logic [1:0] line_sel,
  output cfx_t       line [MDIM]
);

  fx_t re_buf [MDIM][MDIM];
  fx_t im_buf [MDIM][MDIM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < MDIM; r++)
        for (int c = 0; c < MDIM; c++) begin
          re_buf[r][c] <= '0;
          im_buf[r][c] <= '0;
        end
    end else if (colwr_en) begin
      for (int r = 0; r < MDIM; r++) begin
        re_buf[r][colwr_idx] <= colwr_data[r].re;
        im_buf[r][colwr_idx] <= colwr_data[r].im;
      end
    end else if (we) begin
      re_buf[row_in][col_in] <= real_in;
      im_buf[row_in][col_in] <= imag_in;
    end
  end

  // Read controller
  always_comb begin
    for (int k = 0; k < MDIM; k++) begin
      if (TRANSPOSE) begin
        line[k].re = re_buf[k][line_sel];
        line[k].im = im_buf[k][line_sel];
      end else begin
        line[k].re = re_buf[line_sel][k];
        line[k].im = im_buf[line_sel][k];
      end
    end
  end

endmodule
