// tb_output_buffer: writes random results at random (row, col) positions
// and reads them back, checking REAL_OUT/IMAG_OUT one cycle after each read
// request and that the outputs hold between reads.
module tb_output_buffer;
  import bss_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we = 0, rd = 0;
  logic [1:0] wr_row = 0, wr_col = 0, rd_row = 0, rd_col = 0;
  cfx_t din = '0;
  fx_t REAL_OUT, IMAG_OUT;
  cfx_t model [MDIM][MDIM];
  int checks = 0, failures = 0;

  output_buffer dut (.clk, .rst_n, .we, .wr_row, .wr_col, .din, .rd, .rd_row, .rd_col,
                     .REAL_OUT, .IMAG_OUT);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < MDIM; r++) for (int c = 0; c < MDIM; c++) model[r][c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = $urandom_range(1, 0);
      wr_row = 2'($urandom); wr_col = 2'($urandom);
      din = '{re: $urandom, im: $urandom};
      rd = 1; rd_row = 2'($urandom); rd_col = 2'($urandom);
      begin
        automatic cfx_t exp_v = model[rd_row][rd_col];   // read sees the old contents
        if (we) model[wr_row][wr_col] = din;
        @(negedge clk);
        we = 0; rd = 0;
        checks++;
        if (REAL_OUT !== exp_v.re || IMAG_OUT !== exp_v.im) failures++;
        @(negedge clk);
        checks++;
        if (REAL_OUT !== exp_v.re || IMAG_OUT !== exp_v.im) failures++;  // held
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
