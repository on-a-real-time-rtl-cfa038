// cmm: Complex Matrix Multiplier, the accelerator that computes the 4x4
// complex matrix products of the unmixing-weight adaptation and of the
// filtering of the transformed microphone signals.
//
// Structure (as in the block diagram): MATRIX A and MATRIX B operand
// buffers, each a real and an imaginary buffer with a read controller; the
// CMAC4 four-term complex multiply-accumulate; the output buffer with its
// write controller; and the MM4x4 controller that schedules it all. The
// result element C[i][j] is written at the row of A and the column of B it
// came from.
//
// Interface: elements of A and B are written with weA/weB at
// (rowX_in, colX_in); start begins C = A * B (with src_buf = 1, B is first
// filled from the FFT buffer, column c from bin bin_base+c); busy is high
// until done pulses; rd at (rowC, colC) returns C on REAL_OUT/IMAG_OUT one
// cycle later. Writes to A and B are ignored while busy.
// Arithmetic: Q12.20, 32 bits, saturating (see cmac4).
// Timing: 18 cycles from start to done without the buffer fill.
module cmm
  import bss_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  fx_t        real_inA,
  input  fx_t        imag_inA,
  input  logic [1:0] rowA_in,
  input  logic [1:0] colA_in,
  input  logic       weA,
  input  fx_t        real_inB,
  input  fx_t        imag_inB,
  input  logic [1:0] rowB_in,
  input  logic [1:0] colB_in,
  input  logic       weB,
  input  logic       start,
  input  logic       src_buf,
  input  logic [7:0] bin_base,
  output logic       buf_req,
  output logic [7:0] buf_bin,
  input  logic       buf_gnt,
  input  logic       buf_rvalid,
  input  cfx_t       buf_rdata [MDIM],
  input  logic       rd,
  input  logic [1:0] rowC,
  input  logic [1:0] colC,
  output fx_t        REAL_OUT,
  output fx_t        IMAG_OUT,
  output logic       busy,
  output logic       done
);

  cfx_t       a_line [MDIM];
  cfx_t       b_line [MDIM];
  cfx_t       unused_col [MDIM];
  cfx_t       mac_y;
  logic       mac_y_valid;
  logic [1:0] a_sel, b_sel;
  logic       mac_valid;
  logic       colwr_en;
  logic [1:0] colwr_idx;
  logic       out_we;
  logic [1:0] out_row, out_col;

  always_comb
    for (int k = 0; k < MDIM; k++) unused_col[k] = '0;

  matrix_buffer #(.TRANSPOSE(1'b0)) u_matrix_a (
    .clk, .rst_n,
    .we(weA && !busy), .row_in(rowA_in), .col_in(colA_in),
    .real_in(real_inA), .imag_in(imag_inA),
    .colwr_en(1'b0), .colwr_idx(2'd0), .colwr_data(unused_col),
    .line_sel(a_sel), .line(a_line)
  );

  matrix_buffer #(.TRANSPOSE(1'b1)) u_matrix_b (
    .clk, .rst_n,
    .we(weB && !busy), .row_in(rowB_in), .col_in(colB_in),
    .real_in(real_inB), .imag_in(imag_inB),
    .colwr_en(colwr_en), .colwr_idx(colwr_idx), .colwr_data(buf_rdata),
    .line_sel(b_sel), .line(b_line)
  );

  mm4x4_controller u_ctrl (
    .clk, .rst_n,
    .start, .src_buf, .bin_base,
    .buf_req, .buf_bin, .buf_gnt, .buf_rvalid,
    .colwr_en, .colwr_idx,
    .a_sel, .b_sel, .mac_valid,
    .out_we, .out_row, .out_col,
    .busy, .done
  );

  cmac4 u_cmac4 (
    .clk, .rst_n,
    .in_valid(mac_valid), .a(a_line), .b(b_line),
    .y_valid(mac_y_valid), .y(mac_y)
  );

  output_buffer u_out (
    .clk, .rst_n,
    .we(out_we), .wr_row(out_row), .wr_col(out_col), .din(mac_y),
    .rd, .rd_row(rowC), .rd_col(colC),
    .REAL_OUT, .IMAG_OUT
  );

  // The controller's delayed write strobe must line up with the CMAC4 output.
  a_write_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    out_we == mac_y_valid);

endmodule
