// fcb_fifo: the FIFO of the coprocessor-bus interface logic. It buffers
// the words of a LOAD transfer so that the processor side can deliver them
// back to back while the decoder writes them into the accelerator.
//
// A synchronous first-in first-out queue of DEPTH words of W bits: push
// writes din when not full, pop removes the head when not empty. dout shows
// the head combinationally; count is the fill level. Pushing when full and
// popping when empty are ignored (and flagged by assertions). The depth is
// this design's choice, large enough for one whole LOAD transfer.
module fcb_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 32,
  parameter int PW    = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         full,
  output logic         empty,
  output logic [PW:0]  count
);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;

  assign full  = (count == (PW+1)'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rp];

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  always_ff @(posedge clk)
    if (do_push) mem[wp] <= din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (int'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (int'(rp) == DEPTH-1) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
