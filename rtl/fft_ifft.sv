// fft_ifft: N-point (default 256) complex FFT / inverse FFT on 24-bit words,
// the accelerator for the short-time transform of the microphone signals and
// for the reconstruction of the output in the time domain.
//
// How it works: an in-place iterative radix-2 decimation-in-time transform.
// Samples written through the load port are stored at bit-reversed
// addresses; start then runs log2(N) stages of N/2 butterflies, one
// butterfly per clock, reading and writing the working memory in the same
// cycle. Twiddle factors cos/sin(2*pi*k/N) are computed at elaboration into
// a constant table (Q2.22). Each butterfly output is halved and saturated,
// so the forward transform returns DFT(x)/N and the inverse returns the
// exact inverse DFT of its input (the 1/N lies in the per-stage halving).
// Results are read back in natural order.
//
// Interface: wr/wr_addr/wr_data load sample wr_addr (addresses >= N are
// ignored, as are writes while busy); start with inverse = 0/1 runs the
// FFT/IFFT; with to_buf = 1 the N results are then streamed out on
// out_valid/out_idx/out_data (one per cycle while out_ready, tagged with
// the mic number given at start) before done pulses. rd/rd_addr returns a
// result on rd_data one cycle later.
// Timing: done is high in the cycle after the last of the
// (N/2)*log2(N) butterfly cycles (1024 for N = 256), plus N streaming
// cycles with to_buf when out_ready stays high.
// The size and word width follow the design; the radix-2 structure,
// scaling and streaming port are this design's choices (the original uses
// a vendor FFT core).
module fft_ifft
  import bss_pkg::*;
#(
  parameter int N     = 256,
  parameter int LOGN  = $clog2(N),
  parameter int TWF   = 22      // fraction bits of the twiddle factors
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr,
  input  logic [AW-1:0]   wr_addr,
  input  cfw_t            wr_data,
  input  logic            start,
  input  logic            inverse,
  input  logic            to_buf,
  input  logic [1:0]      mic,
  output logic            busy,
  output logic            done,
  input  logic            rd,
  input  logic [AW-1:0]   rd_addr,
  output cfw_t            rd_data,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [LOGN-1:0] out_idx,
  output logic [1:0]      out_mic,
  output cfw_t            out_data
);

  typedef logic signed [FFT_W-1:0] tw_t [N/2];

  function automatic tw_t gen_twiddle(input bit sine);
    tw_t  t;
    real  ang;
    for (int i = 0; i < N/2; i++) begin
      ang  = 6.283185307179586 * i / N;
      t[i] = sine ? FFT_W'($rtoi($sin(ang) * (2.0 ** TWF)))
                  : FFT_W'($rtoi($cos(ang) * (2.0 ** TWF)));
    end
    return t;
  endfunction

  localparam tw_t COS_T = gen_twiddle(1'b0);
  localparam tw_t SIN_T = gen_twiddle(1'b1);

  function automatic logic [LOGN-1:0] bitrev(input logic [LOGN-1:0] a);
    for (int i = 0; i < LOGN; i++) bitrev[i] = a[LOGN-1-i];
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_STREAM} state_e;
  state_e state;

  cfw_t mem [N];

  logic [$clog2(LOGN)-1:0] stage;
  logic [LOGN-2:0]         bfly;
  logic                    inv_q, to_buf_q;
  logic [1:0]              mic_q;
  logic [LOGN-1:0]         sidx;

  // Butterfly addressing: half = 2^stage, i0 = group*2*half + pos.
  logic [LOGN-1:0] i0, i1, half;
  logic [LOGN-2:0] pos, tw_idx, pos_mask;

  always_comb begin
    half     = LOGN'(1) << stage;
    pos_mask = (LOGN-1)'((LOGN'(1) << stage) - LOGN'(1));
    pos      = bfly & pos_mask;
    i0       = ((LOGN'(bfly) >> stage) << (stage + 1)) | LOGN'(pos);
    i1       = i0 | half;
    tw_idx   = (LOGN-1)'(pos << (LOGN - 1 - int'(stage)));
  end

  // t = x1 * W, W = cos -/+ j sin for FFT / IFFT
  cfw_t x0, x1, y0, y1;
  logic signed [FFT_W-1:0] wc, ws;
  logic signed [63:0] tr, ti, p_rc, p_is, p_ic, p_rs;

  always_comb begin
    x0   = mem[i0];
    x1   = mem[i1];
    wc   = COS_T[tw_idx];
    ws   = SIN_T[tw_idx];
    p_rc = 64'(x1.re * wc);
    p_is = 64'(x1.im * ws);
    p_ic = 64'(x1.im * wc);
    p_rs = 64'(x1.re * ws);
    if (!inv_q) begin
      tr = (p_rc + p_is) >>> TWF;
      ti = (p_ic - p_rs) >>> TWF;
    end else begin
      tr = (p_rc - p_is) >>> TWF;
      ti = (p_ic + p_rs) >>> TWF;
    end
    y0.re = sat_fw((64'(x0.re) + tr) >>> 1);
    y0.im = sat_fw((64'(x0.im) + ti) >>> 1);
    y1.re = sat_fw((64'(x0.re) - tr) >>> 1);
    y1.im = sat_fw((64'(x0.im) - ti) >>> 1);
  end

  assign busy      = (state != S_IDLE);
  assign out_valid = (state == S_STREAM);
  assign out_idx   = sidx;
  assign out_mic   = mic_q;
  assign out_data  = mem[sidx];

  localparam int LAST_STAGE = LOGN - 1;

  always_ff @(posedge clk) begin
    if (state == S_RUN) begin
      mem[i0] <= y0;
      mem[i1] <= y1;
    end else if (state == S_IDLE && wr && wr_addr < AW'(N)) begin
      mem[bitrev(wr_addr[LOGN-1:0])] <= wr_data;
    end
    if (rd) rd_data <= mem[rd_addr[LOGN-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      stage    <= '0;
      bfly     <= '0;
      inv_q    <= 1'b0;
      to_buf_q <= 1'b0;
      mic_q    <= '0;
      sidx     <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_RUN;
          stage    <= '0;
          bfly     <= '0;
          inv_q    <= inverse;
          to_buf_q <= to_buf;
          mic_q    <= mic;
        end
        S_RUN: begin
          bfly <= bfly + 1'b1;
          if (&bfly) begin
            stage <= stage + 1'b1;
            if (int'(stage) == LAST_STAGE) begin
              sidx <= '0;
              if (to_buf_q) state <= S_STREAM;
              else begin
                state <= S_IDLE;
                done  <= 1'b1;
              end
            end
          end
        end
        S_STREAM: if (out_ready) begin
          sidx <= sidx + 1'b1;
          if (&sidx) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
