// mm4x4_controller: sequencer of the 4x4 complex matrix multiplier.
//
// On start it optionally fills matrix B from the FFT buffer (src_buf = 1):
// it requests the four bins bin_base .. bin_base+3 from the buffer, one per
// granted cycle, and writes the microphone vector returned for bin
// bin_base+c into column c of B. It then issues the 16 row-by-column
// products C[i][j] = row i of A times column j of B, one per cycle, to the
// CMAC4 (a_sel = i, b_sel = j, mac_valid), and delays each (i, j) by the
// CMAC4's one-cycle latency to form the output buffer's write address.
// done pulses for one cycle once the last result is in the output buffer.
//
// Timing without the buffer fill: start sampled at a clock edge, done is
// high during the 18th cycle after that edge (16 issue cycles, one drain
// cycle, then done). The time-multiplexed, sequential schedule follows the
// design description; the fill from the buffer is this design's own use of
// the buffer between the FFT and the matrix multipliers.
module mm4x4_controller
  import bss_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       src_buf,
  input  logic [7:0] bin_base,
  // FFT buffer fetch
  output logic       buf_req,
  output logic [7:0] buf_bin,
  input  logic       buf_gnt,
  input  logic       buf_rvalid,
  output logic       colwr_en,
  output logic [1:0] colwr_idx,
  // CMAC4 schedule
  output logic [1:0] a_sel,
  output logic [1:0] b_sel,
  output logic       mac_valid,
  // output buffer write
  output logic       out_we,
  output logic [1:0] out_row,
  output logic [1:0] out_col,
  output logic       busy,
  output logic       done
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_COMP, S_DRAIN} state_e;
  state_e     state;
  logic [3:0] idx;       // product index i*4 + j
  logic [2:0] req_cnt;   // bins requested
  logic [1:0] rcv_cnt;   // bins received
  logic [7:0] base_q;

  assign busy      = (state != S_IDLE);
  assign mac_valid = (state == S_COMP);
  assign a_sel     = idx[3:2];
  assign b_sel     = idx[1:0];
  assign buf_req   = (state == S_FETCH) && !req_cnt[2];
  assign buf_bin   = base_q + 8'(req_cnt);
  assign colwr_en  = (state == S_FETCH) && buf_rvalid;
  assign colwr_idx = rcv_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      idx     <= '0;
      req_cnt <= '0;
      rcv_cnt <= '0;
      base_q  <= '0;
      out_we  <= 1'b0;
      out_row <= '0;
      out_col <= '0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      out_we  <= mac_valid;
      out_row <= idx[3:2];
      out_col <= idx[1:0];
      unique case (state)
        S_IDLE: if (start) begin
          idx     <= '0;
          req_cnt <= '0;
          rcv_cnt <= '0;
          base_q  <= bin_base;
          state   <= src_buf ? S_FETCH : S_COMP;
        end
        S_FETCH: begin
          if (buf_req && buf_gnt) req_cnt <= req_cnt + 3'd1;
          if (buf_rvalid) begin
            rcv_cnt <= rcv_cnt + 2'd1;
            if (rcv_cnt == 2'd3) state <= S_COMP;
          end
        end
        S_COMP: begin
          idx <= idx + 4'd1;
          if (idx == 4'd15) state <= S_DRAIN;
        end
        S_DRAIN: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The buffer only answers requests that were granted.
  a_rvalid_in_fetch: assert property (@(posedge clk) disable iff (!rst_n)
    buf_rvalid |-> state == S_FETCH);

endmodule
