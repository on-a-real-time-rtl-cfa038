// output_buffer: result store of the matrix multiplier, the write
// controller with the real and imaginary output buffers of the block
// diagram.
//
// The write controller stores the CMAC4 result din at (wr_row, wr_col) when
// we is high. A read request rd at (rd_row, rd_col) returns the element on
// REAL_OUT/IMAG_OUT one cycle later; the outputs hold until the next read.
// Reset clears the buffer. Register storage and the one-cycle read are this
// design's choices.
module output_buffer
  import bss_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [1:0] wr_row,
  input  logic [1:0] wr_col,
  input  cfx_t       din,
  input  logic       rd,
  input  logic [1:0] rd_row,
  input  logic [1:0] rd_col,
  output fx_t        REAL_OUT,
  output fx_t        IMAG_OUT
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
      REAL_OUT <= '0;
      IMAG_OUT <= '0;
    end else begin
      if (we) begin
        re_buf[wr_row][wr_col] <= din.re;
        im_buf[wr_row][wr_col] <= din.im;
      end
      if (rd) begin
        REAL_OUT <= re_buf[rd_row][rd_col];
        IMAG_OUT <= im_buf[rd_row][rd_col];
      end
    end
  end

endmodule
