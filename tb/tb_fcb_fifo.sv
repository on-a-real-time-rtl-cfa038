// tb_fcb_fifo: random push/pop traffic against a queue model; checks the
// head word, empty/full flags and fill count every cycle, and that the FIFO
// both fills completely and empties during the run.
module tb_fcb_fifo;
  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push = 0, pop = 0, full, empty;
  logic [31:0] din = 0, dout;
  logic [5:0] count;
  logic [31:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  fcb_fifo #(.W(32), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .full, .empty, .count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      automatic int bias = (t / 500) % 2;   // phases that favour filling or draining
      @(negedge clk);
      checks++;
      if (count != 6'(q.size()) || empty != (q.size() == 0) || full != (q.size() == DEPTH)) failures++;
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) failures++;
      end
      if (full) n_full++;
      if (empty) n_empty++;
      push = !full && ($urandom_range(3, 0) < (bias ? 3 : 1));
      pop  = !empty && ($urandom_range(3, 0) < (bias ? 1 : 3));
      din  = $urandom;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks += 2;
    if (n_full == 0) failures++;
    if (n_empty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
