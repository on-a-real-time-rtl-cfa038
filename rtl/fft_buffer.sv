// fft_buffer: the buffer between the FFT/IFFT units and the complex matrix
// multipliers. It holds one transformed frame for each microphone, BINS
// complex bins per microphone, so that a matrix multiplier can take the
// microphone vector X(k) = [X_0(k) .. X_{MICS-1}(k)] of a bin k in one read.
//
// Write side: each FFT unit streams its results in (w_valid, w_mic, w_bin,
// w_data); one write is accepted per cycle, the lowest-numbered requesting
// unit first (w_ready). Read side: each matrix multiplier requests a bin
// (r_req, r_bin); one request is granted per cycle, lowest number first
// (r_gnt), and one cycle after the grant r_valid of that requester is high
// with the MICS values on r_data, sign-extended from the 24-bit FFT word to
// the 32-bit matrix word (both have 20 fraction bits).
// Because the arbitration is fixed-priority, w_ready[0] and r_gnt[0] are
// simply w_valid[0] and r_req[0]: the first unit never waits.
// The published design shows this buffer only as a block between the FFT and the
// matrix multipliers; its organisation, arbitration and timing here are
// this design's choices.
module fft_buffer
  import bss_pkg::*;
#(
  parameter int MICS = 4,
  parameter int BINS = 256,
  parameter int NWR  = 2,
  parameter int NRD  = 5,
  parameter int BW   = $clog2(BINS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          w_valid [NWR],
  input  logic [1:0]    w_mic   [NWR],
  input  logic [BW-1:0] w_bin   [NWR],
  input  cfw_t          w_data  [NWR],
  output logic          w_ready [NWR],
  input  logic          r_req   [NRD],
  input  logic [BW-1:0] r_bin   [NRD],
  output logic          r_gnt   [NRD],
  output logic          r_valid [NRD],
  output cfx_t          r_data  [MICS]
);

  cfw_t mem [MICS][BINS];

  // Fixed-priority write arbitration
  logic          wr_en;
  logic [1:0]    wr_mic;
  logic [BW-1:0] wr_bin;
  cfw_t          wr_dat;

  always_comb begin
    wr_en  = 1'b0;
    wr_mic = '0;
    wr_bin = '0;
    wr_dat = '0;
    for (int i = 0; i < NWR; i++) begin
      w_ready[i] = w_valid[i] && !wr_en;
      if (w_valid[i] && !wr_en) begin
        wr_en  = 1'b1;
        wr_mic = w_mic[i];
        wr_bin = w_bin[i];
        wr_dat = w_data[i];
      end
    end
  end

  // Fixed-priority read arbitration
  logic          rd_en;
  logic [BW-1:0] rd_bin;

  always_comb begin
    rd_en  = 1'b0;
    rd_bin = '0;
    for (int i = 0; i < NRD; i++) begin
      r_gnt[i] = r_req[i] && !rd_en;
      if (r_req[i] && !rd_en) begin
        rd_en  = 1'b1;
        rd_bin = r_bin[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_mic) < MICS) mem[wr_mic][wr_bin] <= wr_dat;
    if (rd_en)
      for (int m = 0; m < MICS; m++) begin
        r_data[m].re <= DW'(mem[m][rd_bin].re);
        r_data[m].im <= DW'(mem[m][rd_bin].im);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NRD; i++) r_valid[i] <= 1'b0;
    end else begin
      for (int i = 0; i < NRD; i++) r_valid[i] <= r_gnt[i];
    end
  end

endmodule
