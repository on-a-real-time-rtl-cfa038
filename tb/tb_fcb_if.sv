// tb_fcb_if: drives the coprocessor-bus interface like a processor would
// (instructions, 24-word loads with random gaps, 2-word stores) against two
// model units, and checks: element writes (address, real and imaginary
// word), the written flag, the start pulse and its mode bits, STORE data,
// the WAIT state while a unit computes, the status word with its busy and
// done masks, clearing of the done mask, the interrupt and NOP handling.
// Every state of the load/store state machine must be visited.
module tb_fcb_if;
  import bss_pkg::*;
  localparam int NU = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic instr_valid = 0, ld_valid = 0, irq_en = 0;
  fcb_instr_t instr = '0;
  logic [31:0] ld_data = 0, st_data;
  logic instr_ready, ld_ready, ld_written, st_valid, irq, result_ready;
  fcb_state_e fsm_state;
  logic [2:0] u_sel;
  logic u_wr, u_go, u_rd;
  logic [AW-1:0] u_addr;
  cfx_t u_wdata, u_rdata;
  logic [3:0] u_mode;
  logic [NU-1:0] u_done;
  int checks = 0, failures = 0;
  int n_state [4];
  int n_go = 0, n_written = 0;
  logic [3:0] last_mode;

  fcb_if #(.NU(NU)) dut (.*);

  // model units: memory, and a busy counter after go
  cfx_t umem [NU][64];
  int   ucount [NU];
  cfx_t rdata_q;
  assign u_rdata = rdata_q;
  always_ff @(posedge clk) begin
    for (int u = 0; u < NU; u++) begin
      u_done[u] <= 1'b0;
      if (ucount[u] > 0) begin
        ucount[u] <= ucount[u] - 1;
        if (ucount[u] == 1) u_done[u] <= 1'b1;
      end
    end
    if (u_wr && int'(u_sel) < NU) umem[u_sel][u_addr[5:0]] <= u_wdata;
    if (u_go && int'(u_sel) < NU) begin
      ucount[u_sel] <= 30 + int'($urandom_range(20, 0));
      n_go++;
      last_mode <= u_mode;
    end
    if (u_rd) rdata_q <= umem[u_sel][u_addr[5:0]];
    if (ld_written) n_written++;
    n_state[fsm_state]++;
  end

  // a unit must not be started twice
  a_go_once: assert property (@(posedge clk) disable iff (!rst_n)
    u_go |-> ucount[u_sel] == 0);

  task automatic issue(input fcb_op_e op, input bit go, input logic [3:0] mode,
                       input int unit, input int addr);
    @(negedge clk);
    instr_valid = 1;
    instr = '{op: op, go: go, mode: mode, unit: 3'(unit), addr: AW'(addr)};
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    @(negedge clk);
    instr_valid = 0;
  endtask

  task automatic send_load(input int unit, input int addr, input bit go, input logic [3:0] mode,
                           ref cfx_t vals [12]);
    int w = 0;
    issue(FCB_LOAD, go, mode, unit, addr);
    while (w < 24) begin
      ld_valid = ($urandom_range(3, 0) != 0);
      ld_data = (w % 2 == 0) ? vals[w / 2].re : vals[w / 2].im;
      @(posedge clk);
      if (ld_valid && ld_ready) w++;
      @(negedge clk);
    end
    ld_valid = 0;
  endtask

  task automatic do_store(input int unit, input int addr, output logic [31:0] w0, output logic [31:0] w1,
                          output int cycles);
    int nb = 0;
    cycles = 0;
    issue(FCB_STORE, 0, 4'd0, unit, addr);
    while (nb < 2 && cycles < 500) begin
      if (st_valid) begin
        if (nb == 0) w0 = st_data; else w1 = st_data;
        nb++;
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (nb != 2) failures++;
    @(negedge clk);
    checks++;
    if (st_valid) failures++;   // exactly 8 bytes
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfx_t vals [12];
    logic [31:0] w0, w1;
    int cyc, base;
    for (int u = 0; u < NU; u++) begin
      ucount[u] = 0;
      for (int i = 0; i < 64; i++) umem[u][i] = '0;
    end
    rdata_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // a NOP changes nothing
    issue(FCB_NOP, 0, 0, 0, 0);
    repeat (3) @(negedge clk);
    checks++;
    if (fsm_state != FCB_IDLE) failures++;
    for (int t = 0; t < 30; t++) begin
      automatic int u = t % NU;
      automatic bit go = (t % 3 != 0);
      automatic logic [3:0] mode = 4'($urandom);
      base = int'($urandom_range(40, 0));
      for (int i = 0; i < 12; i++) vals[i] = '{re: $urandom, im: $urandom};
      begin
        automatic int wr0 = n_written, go0 = n_go;
        send_load(u, base, go, mode, vals);
        // wait until the load is written
        cyc = 0;
        while (!instr_ready && cyc < 100) begin @(negedge clk); cyc++; end
        @(negedge clk);   // the model counts the written flag at the next edge
        checks += 2;
        if (n_written != wr0 + 1) failures++;
        if (n_go != go0 + (go ? 1 : 0)) failures++;
        if (go) begin
          checks++;
          if (last_mode != mode) failures++;
        end
      end
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (umem[u][base + i] !== vals[i]) failures++;
      end
      if (go && t % 2 == 0) begin
        // polling: the status word shows the unit busy, then done
        do_store(u, int'(STATUS_ADDR), w0, w1, cyc);
        checks++;
        if (w0[8 + u] != 1'b1 || w0[u] != 1'b0 || w1 != 0) failures++;
        irq_en = 1;
        cyc = 0;
        while (!irq && cyc < 200) begin @(negedge clk); cyc++; end
        checks++;
        if (!irq || !result_ready) failures++;
        do_store(u, int'(STATUS_ADDR), w0, w1, cyc);
        checks += 2;
        if (w0[8 + u] != 1'b0 || w0[u] != 1'b1) failures++;
        if (irq || result_ready) failures++;   // cleared by the status read
        irq_en = 0;
      end
      // store an element: through WAIT when the unit is still busy
      begin
        automatic int k = int'($urandom_range(11, 0));
        automatic int st0 = n_state[FCB_WAIT];
        do_store(u, base + k, w0, w1, cyc);
        checks++;
        if (w0 !== vals[k].re || w1 !== vals[k].im) failures++;
        if (go && t % 2 == 1) begin
          checks++;
          if (n_state[FCB_WAIT] <= st0 + 20) failures++;  // waited for the unit
        end
      end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (n_state[s] == 0) begin failures++; $display("state %0d never visited", s); end
    end
    $display("states: idle %0d load %0d store %0d wait %0d", n_state[0], n_state[1], n_state[2], n_state[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
