// tb_matrix_buffer: writes random 4x4 complex matrices element by element
// and by whole columns into a row-reading (A) and a column-reading (B)
// instance, and checks every line the read controllers present against a
// testbench copy of the matrix. Also checks reset clearing and that a column
// write wins over an element write in the same cycle.
module tb_matrix_buffer;
  import bss_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       we = 0, colwr_en = 0;
  logic [1:0] row_in = 0, col_in = 0, colwr_idx = 0, line_sel = 0;
  fx_t        real_in = 0, imag_in = 0;
  cfx_t       colwr_data [MDIM];
  cfx_t       line_a [MDIM], line_b [MDIM];
  cfx_t       model [MDIM][MDIM];
  int checks = 0, failures = 0;

  matrix_buffer #(.TRANSPOSE(1'b0)) dut_a (.clk, .rst_n, .we, .row_in, .col_in,
    .real_in, .imag_in, .colwr_en, .colwr_idx, .colwr_data, .line_sel, .line(line_a));
  matrix_buffer #(.TRANSPOSE(1'b1)) dut_b (.clk, .rst_n, .we, .row_in, .col_in,
    .real_in, .imag_in, .colwr_en, .colwr_idx, .colwr_data, .line_sel, .line(line_b));

  task automatic check_all();
    for (int s = 0; s < MDIM; s++) begin
      line_sel = 2'(s);
      #1;
      for (int k = 0; k < MDIM; k++) begin
        checks += 2;
        if (line_a[k] !== model[s][k]) failures++;
        if (line_b[k] !== model[k][s]) failures++;
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < MDIM; r++) begin
      colwr_data[r] = '0;
      for (int c = 0; c < MDIM; c++) model[r][c] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int t = 0; t < 50; t++) begin
      for (int e = 0; e < 16; e++) begin
        @(negedge clk);
        we = 1; row_in = 2'(e / 4); col_in = 2'(e % 4);
        real_in = $urandom; imag_in = $urandom;
        model[e/4][e%4] = '{re: real_in, im: imag_in};
      end
      @(negedge clk); we = 0;
      check_all();
      // column write, with a colliding element write that must lose
      colwr_en = 1; colwr_idx = 2'($urandom); we = 1;
      row_in = 2'($urandom); col_in = colwr_idx; real_in = 32'h1234; imag_in = 32'h5678;
      for (int r = 0; r < MDIM; r++) begin
        colwr_data[r] = '{re: $urandom, im: $urandom};
        model[r][colwr_idx] = colwr_data[r];
      end
      @(negedge clk); colwr_en = 0; we = 0;
      check_all();
    end
    rst_n = 0; #1; rst_n = 1;
    for (int r = 0; r < MDIM; r++) for (int c = 0; c < MDIM; c++) model[r][c] = '0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
