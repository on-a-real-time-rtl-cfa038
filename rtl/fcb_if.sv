// fcb_if: interface logic between the processor's coprocessor bus and one
// group of accelerator units: the decoder state machine and its load FIFO.
//
// The processor issues instructions (instr_valid/instr, accepted while
// instr_ready). The state machine has four states:
//   IDLE  - waits for an instruction; a NOP is ignored.
//   LOAD  - accepts LOAD_BYTES bytes as 32-bit words (ld_valid/ld_ready)
//           into the FIFO, then returns to IDLE.
//   WAIT  - entered by a STORE while the addressed unit is still computing;
//           left for STORE when its result is ready.
//   STORE - returns STORE_BYTES bytes (st_valid/st_data, real word first,
//           then imaginary word) of the addressed element, then IDLE.
// Behind the state machine the FIFO is drained one word per cycle; each
// pair of words (real, imaginary) becomes one element write (u_wr, u_addr,
// u_wdata) at consecutive addresses from the instruction's address. When
// the whole load is written, ld_written pulses and, if the LOAD had its go
// bit set, u_go starts the unit with the instruction's mode bits.
// Completion can be polled or signalled: a STORE from STATUS_ADDR returns
// {16'b0, busy mask, done mask} and clears the done mask; irq is high while
// irq_en is set and any unit's done bit is set.
// Timing: the store data come from a unit read issued as the state machine
// enters STORE (u_rd); units answer on u_rdata in the next cycle.
// The states, their transitions and the 96-byte load / 8-byte store sizes
// follow the design description; the instruction encoding, the 32-bit beat,
// element packing, status word and FIFO depth are this design's choices.
module fcb_if
  import bss_pkg::*;
#(
  parameter int LOAD_BYTES  = 96,
  parameter int STORE_BYTES = 8,
  parameter int BEAT_BYTES  = 4,
  parameter int FIFO_DEPTH  = 32,
  parameter int NU          = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // processor side
  input  logic            instr_valid,
  input  fcb_instr_t      instr,
  output logic            instr_ready,
  input  logic            ld_valid,
  input  logic [31:0]     ld_data,
  output logic            ld_ready,
  output logic            ld_written,
  output logic            st_valid,
  output logic [31:0]     st_data,
  input  logic            irq_en,
  output logic            irq,
  output logic            result_ready,
  output fcb_state_e      fsm_state,
  // accelerator side
  output logic [2:0]      u_sel,
  output logic            u_wr,
  output logic [AW-1:0]   u_addr,
  output cfx_t            u_wdata,
  output logic            u_go,
  output logic [3:0]      u_mode,
  output logic            u_rd,
  input  cfx_t            u_rdata,
  input  logic [NU-1:0]   u_done
);

  localparam int LOAD_BEATS  = LOAD_BYTES / BEAT_BYTES;
  localparam int STORE_BEATS = STORE_BYTES / BEAT_BYTES;
  localparam int BCW         = $clog2(LOAD_BEATS + STORE_BEATS + 1);

  fcb_state_e     state;
  logic [BCW-1:0] beats;
  logic [2:0]     unit_q;
  logic [AW-1:0]  addr_q;
  logic           go_q;
  logic [3:0]     mode_q;
  logic           load_pend;   // a load's data is not yet all written
  logic [AW-1:0]  wr_ptr;
  logic           have_re;
  fx_t            re_hold;
  logic [7:0]     active, done_mask;  // one bit per unit, NU <= 8
  logic [31:0]    status_hold;
  logic           st_status;

  // FIFO
  logic        f_push, f_pop, f_full, f_empty;
  logic [31:0] f_dout;
  logic [$clog2(FIFO_DEPTH):0] f_count;  // fill level, not needed here

  assign ld_ready = (state == FCB_LD) && !f_full;
  assign f_push   = ld_valid && ld_ready;
  assign f_pop    = !f_empty;

  fcb_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(f_push), .din(ld_data), .pop(f_pop), .dout(f_dout),
    .full(f_full), .empty(f_empty), .count(f_count)
  );

  wire drained   = load_pend && (state != FCB_LD) && f_empty && !have_re;
  wire unit_ok   = int'(instr.unit) < NU;
  wire unit_busy = unit_ok && active[instr.unit];
  wire take      = instr_valid && instr_ready;
  wire st_now    = take && (instr.op == FCB_STORE) &&
                   ((instr.addr == STATUS_ADDR) || !unit_busy);
  wire wait_done = (state == FCB_WAIT) && !active[unit_q];

  assign instr_ready  = (state == FCB_IDLE) && !load_pend;
  assign fsm_state    = state;
  assign result_ready = |done_mask;
  assign irq          = irq_en && |done_mask;

  // Unit-side address, selection and read strobe
  always_comb begin
    u_wr    = f_pop && have_re;
    u_wdata = '{re: re_hold, im: f_dout};
    u_rd    = 1'b0;
    if (load_pend) begin
      u_addr = wr_ptr;
      u_sel  = unit_q;
    end else if (state == FCB_IDLE) begin
      u_addr = instr.addr;
      u_sel  = instr.unit;
      u_rd   = st_now && (instr.addr != STATUS_ADDR);
    end else begin
      u_addr = addr_q;
      u_sel  = unit_q;
      u_rd   = wait_done;
    end
  end

  assign u_go   = drained && go_q;
  assign u_mode = mode_q;

  // Busy and done masks. A status read clears the done bits it reports; a
  // unit finishing in the same cycle keeps its bit.
  logic [7:0] active_nx, done_nx;
  always_comb begin
    active_nx = active;
    done_nx   = done_mask;
    if (take && instr.op == FCB_STORE && instr.addr == STATUS_ADDR) done_nx = '0;
    for (int u = 0; u < NU; u++)
      if (u_done[u]) begin
        active_nx[u] = 1'b0;
        done_nx[u]   = 1'b1;
      end
    if (u_go && int'(unit_q) < NU) begin  // unit numbers >= NU are ignored
      active_nx[unit_q] = 1'b1;
      done_nx[unit_q]   = 1'b0;
    end
  end

  // Store data: real word, imaginary word, then zeros
  assign st_valid = (state == FCB_ST);
  always_comb begin
    if (st_status)         st_data = (beats == '0) ? status_hold : 32'd0;
    else if (beats == '0)  st_data = u_rdata.re;
    else if (beats == 1)   st_data = u_rdata.im;
    else                   st_data = 32'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= FCB_IDLE;
      beats       <= '0;
      unit_q      <= '0;
      addr_q      <= '0;
      go_q        <= 1'b0;
      mode_q      <= '0;
      load_pend   <= 1'b0;
      wr_ptr      <= '0;
      have_re     <= 1'b0;
      re_hold     <= '0;
      active      <= '0;
      done_mask   <= '0;
      status_hold <= '0;
      st_status   <= 1'b0;
      ld_written  <= 1'b0;
    end else begin
      ld_written <= 1'b0;

      // FIFO drain: pair words into elements
      if (f_pop) begin
        if (!have_re) begin
          re_hold <= f_dout;
          have_re <= 1'b1;
        end else begin
          have_re <= 1'b0;
          wr_ptr  <= wr_ptr + 1'b1;
        end
      end
      if (drained) begin
        load_pend  <= 1'b0;
        ld_written <= 1'b1;
      end

      // Unit completion bookkeeping
      active    <= active_nx;
      done_mask <= done_nx;

      unique case (state)
        FCB_IDLE: if (take) begin
          unit_q <= instr.unit;
          addr_q <= instr.addr;
          go_q   <= instr.go;
          mode_q <= instr.mode;
          beats  <= '0;
          unique case (instr.op)
            FCB_LOAD: begin
              state     <= FCB_LD;
              load_pend <= 1'b1;
              wr_ptr    <= instr.addr;
            end
            FCB_STORE: begin
              st_status <= (instr.addr == STATUS_ADDR);
              if (instr.addr == STATUS_ADDR)
                status_hold <= {16'd0, active, done_mask};
              state <= st_now ? FCB_ST : FCB_WAIT;
            end
            default: ;  // no valid instruction
          endcase
        end
        FCB_LD: if (f_push) begin
          beats <= beats + 1'b1;
          if (int'(beats) == LOAD_BEATS - 1) state <= FCB_IDLE;
        end
        FCB_WAIT: if (wait_done) begin
          state <= FCB_ST;
          beats <= '0;
        end
        FCB_ST: begin
          beats <= beats + 1'b1;
          if (int'(beats) == STORE_BEATS - 1) state <= FCB_IDLE;
        end
        default: state <= FCB_IDLE;
      endcase
    end
  end

  // Rules of the handshake
  if (LOAD_BEATS % 2 != 0 || LOAD_BEATS == 0 || NU > 8) begin : g_bad_config
    $error("fcb_if: a LOAD must carry whole word pairs, and NU <= 8");
  end
  a_store_only_in_store: assert property (@(posedge clk) disable iff (!rst_n)
    st_valid |-> state == FCB_ST);
  a_load_only_in_load: assert property (@(posedge clk) disable iff (!rst_n)
    f_push |-> state == FCB_LD);
  a_go_after_written: assert property (@(posedge clk) disable iff (!rst_n)
    u_go |-> f_empty && !have_re);

endmodule
