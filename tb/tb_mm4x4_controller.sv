// tb_mm4x4_controller: checks the product schedule of the 4x4 multiplier
// sequencer (16 issue cycles in row-major order, write strobes delayed by
// one cycle, done 18 cycles after start) and its buffer fill: four bin
// requests from bin_base with a model buffer that grants at random, and
// one column write per returned vector in order.
module tb_mm4x4_controller;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, src_buf = 0;
  logic [7:0] bin_base = 0;
  logic buf_req, buf_gnt, buf_rvalid = 0;
  logic [7:0] buf_bin;
  logic colwr_en, mac_valid, out_we, busy, done;
  logic [1:0] colwr_idx, a_sel, b_sel, out_row, out_col;
  int checks = 0, failures = 0;
  logic gnt_en = 0;

  mm4x4_controller dut (.clk, .rst_n, .start, .src_buf, .bin_base, .buf_req, .buf_bin,
    .buf_gnt, .buf_rvalid, .colwr_en, .colwr_idx, .a_sel, .b_sel, .mac_valid,
    .out_we, .out_row, .out_col, .busy, .done);

  // model buffer: random grants, answer one cycle after a grant
  assign buf_gnt = buf_req && gnt_en;
  logic [7:0] granted [$];
  always_ff @(posedge clk) begin
    gnt_en     <= ($urandom_range(2, 0) != 0);
    buf_rvalid <= buf_gnt;
    if (buf_gnt) granted.push_back(buf_bin);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit use_buf);
    int cyc = 0, issued = 0, written = 0, cols = 0;
    bit seen_done = 0;
    granted.delete();
    @(negedge clk);
    bin_base = 8'($urandom); src_buf = use_buf; start = 1;
    @(negedge clk); start = 0;
    while (!seen_done && cyc < 200) begin
      cyc++;
      if (colwr_en) begin
        checks++;
        if (colwr_idx != 2'(cols)) failures++;
        cols++;
      end
      if (mac_valid) begin
        checks++;
        if ({a_sel, b_sel} != 4'(issued)) failures++;
        issued++;
      end
      if (out_we) begin
        checks++;
        if ({out_row, out_col} != 4'(written)) failures++;
        written++;
      end
      if (done) begin
        seen_done = 1;
        checks++;
        if (!use_buf && cyc != 18) begin
          failures++;
          $display("latency %0d, expected 18", cyc);
        end
      end
      @(negedge clk);
    end
    checks += 4;
    if (issued != 16 || written != 16) failures++;
    if (!seen_done || busy) failures++;
    if (use_buf && (cols != 4 || granted.size() != 4)) failures++;
    if (!use_buf && cols != 0) failures++;
    if (use_buf)
      for (int i = 0; i < granted.size(); i++) begin
        checks++;
        if (granted[i] != bin_base + 8'(i)) failures++;
      end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) run(t % 2 == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
