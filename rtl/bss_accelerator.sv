// bss_accelerator: hardware accelerator of a real-time blind signal
// separation (BSS) speech enhancement system. A host processor runs the
// separation algorithm and the noise canceller in software and hands the two
// costly kernels to this block: the short-time FFT/IFFT of the microphone
// signals, and the 4x4 complex matrix products of the weight adaptation and
// of the filtering in each frequency bin.
//
// Structure: two coprocessor-bus channels, each with its own interface
// logic (fcb_if: decoder state machine and load FIFO).
//   Channel "fft" serves N_FFT fft_ifft units (N-point, 24-bit).
//   Channel "cmm" serves N_CMM cmm units (4x4 complex, Q12.20).
// Between them sits the fft_buffer: an FFT run with mode bit 1 streams its
// result into the buffer as microphone mode[3:2]; a matrix multiply started
// with mode bit 0 first fills its matrix B with four bins of microphone
// vectors from the buffer. Several units of a channel compute in parallel;
// the instruction's unit field picks one.
//
// Element addresses (this design's map):
//   fft units: LOAD addr = sample index 0..N-1 (real word = sample,
//     imaginary word = 0 for real input; low 24 bits used), STORE addr =
//     bin index; go mode[0] = inverse, mode[1] = stream to buffer,
//     mode[3:2] = microphone.
//   cmm units: LOAD addr 0..15 = A[addr/4][addr%4], 16..31 = B[..][..],
//     32 = bin base for the buffer fill (low 8 bits of the real word);
//     STORE addr 0..15 = C[addr/4][addr%4]; go mode[0] = fill B from
//     the buffer first.
//   either channel: STORE from STATUS_ADDR (all ones) returns the status.
// Default sizes are the published largest configuration: two FFT/IFFT
// units and five matrix multipliers, 256-point transforms, four
// microphones. The address map, the buffer path and the bin-base register
// are this design's choices.
module bss_accelerator
  import bss_pkg::*;
#(
  parameter int N_FFT = 2,
  parameter int N_CMM = 5,
  parameter int N     = 256,
  parameter int MICS  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // FFT/IFFT channel
  input  logic        fft_instr_valid,
  input  fcb_instr_t  fft_instr,
  output logic        fft_instr_ready,
  input  logic        fft_ld_valid,
  input  logic [31:0] fft_ld_data,
  output logic        fft_ld_ready,
  output logic        fft_ld_written,
  output logic        fft_st_valid,
  output logic [31:0] fft_st_data,
  input  logic        fft_irq_en,
  output logic        fft_irq,
  output logic        fft_result_ready,
  output fcb_state_e  fft_fsm_state,
  // Complex matrix multiplier channel
  input  logic        cmm_instr_valid,
  input  fcb_instr_t  cmm_instr,
  output logic        cmm_instr_ready,
  input  logic        cmm_ld_valid,
  input  logic [31:0] cmm_ld_data,
  output logic        cmm_ld_ready,
  output logic        cmm_ld_written,
  output logic        cmm_st_valid,
  output logic [31:0] cmm_st_data,
  input  logic        cmm_irq_en,
  output logic        cmm_irq,
  output logic        cmm_result_ready,
  output fcb_state_e  cmm_fsm_state
);

  localparam int BW = $clog2(N);

  // ---------------- FFT/IFFT channel ----------------
  logic [2:0]       f_sel;
  logic             f_wr, f_go, f_rd;
  logic [AW-1:0]    f_addr;
  cfx_t             f_wdata, f_rdata;
  logic [3:0]       f_mode;
  logic [N_FFT-1:0] f_done;

  fcb_if #(.NU(N_FFT)) u_fft_if (
    .clk, .rst_n,
    .instr_valid(fft_instr_valid), .instr(fft_instr), .instr_ready(fft_instr_ready),
    .ld_valid(fft_ld_valid), .ld_data(fft_ld_data), .ld_ready(fft_ld_ready),
    .ld_written(fft_ld_written),
    .st_valid(fft_st_valid), .st_data(fft_st_data),
    .irq_en(fft_irq_en), .irq(fft_irq), .result_ready(fft_result_ready),
    .fsm_state(fft_fsm_state),
    .u_sel(f_sel), .u_wr(f_wr), .u_addr(f_addr), .u_wdata(f_wdata),
    .u_go(f_go), .u_mode(f_mode), .u_rd(f_rd), .u_rdata(f_rdata),
    .u_done(f_done)
  );

  cfw_t          fu_rdata [N_FFT];
  logic          fu_busy  [N_FFT];
  logic          bw_valid [N_FFT];
  logic          bw_ready [N_FFT];
  logic [BW-1:0] bw_bin   [N_FFT];
  logic [1:0]    bw_mic   [N_FFT];
  cfw_t          bw_data  [N_FFT];

  for (genvar u = 0; u < N_FFT; u++) begin : g_fft
    wire hit = (int'(f_sel) == u);
    logic done_u;
    fft_ifft #(.N(N)) u_fft (
      .clk, .rst_n,
      .wr(f_wr && hit), .wr_addr(f_addr),
      .wr_data('{re: f_wdata.re[FFT_W-1:0], im: f_wdata.im[FFT_W-1:0]}),
      .start(f_go && hit), .inverse(f_mode[0]), .to_buf(f_mode[1]),
      .mic(f_mode[3:2]),
      .busy(fu_busy[u]), .done(done_u),
      .rd(f_rd && hit), .rd_addr(f_addr), .rd_data(fu_rdata[u]),
      .out_valid(bw_valid[u]), .out_ready(bw_ready[u]),
      .out_idx(bw_bin[u]), .out_mic(bw_mic[u]), .out_data(bw_data[u])
    );
    assign f_done[u] = done_u;
  end

  always_comb begin
    f_rdata = '0;
    for (int u = 0; u < N_FFT; u++)
      if (int'(f_sel) == u) begin
        f_rdata.re = DW'(fu_rdata[u].re);
        f_rdata.im = DW'(fu_rdata[u].im);
      end
  end

  // ---------------- buffer between FFT and CMM ----------------
  logic          br_req   [N_CMM];
  logic [BW-1:0] br_bin   [N_CMM];
  logic          br_gnt   [N_CMM];
  logic          br_valid [N_CMM];
  cfx_t          br_data  [MICS];

  fft_buffer #(.MICS(MICS), .BINS(N), .NWR(N_FFT), .NRD(N_CMM)) u_buffer (
    .clk, .rst_n,
    .w_valid(bw_valid), .w_mic(bw_mic), .w_bin(bw_bin), .w_data(bw_data),
    .w_ready(bw_ready),
    .r_req(br_req), .r_bin(br_bin), .r_gnt(br_gnt), .r_valid(br_valid),
    .r_data(br_data)
  );

  // ---------------- complex matrix multiplier channel ----------------
  logic [2:0]       c_sel;
  logic             c_wr, c_go, c_rd;
  logic [AW-1:0]    c_addr;
  cfx_t             c_wdata, c_rdata;
  logic [3:0]       c_mode;
  logic [N_CMM-1:0] c_done;

  fcb_if #(.NU(N_CMM)) u_cmm_if (
    .clk, .rst_n,
    .instr_valid(cmm_instr_valid), .instr(cmm_instr), .instr_ready(cmm_instr_ready),
    .ld_valid(cmm_ld_valid), .ld_data(cmm_ld_data), .ld_ready(cmm_ld_ready),
    .ld_written(cmm_ld_written),
    .st_valid(cmm_st_valid), .st_data(cmm_st_data),
    .irq_en(cmm_irq_en), .irq(cmm_irq), .result_ready(cmm_result_ready),
    .fsm_state(cmm_fsm_state),
    .u_sel(c_sel), .u_wr(c_wr), .u_addr(c_addr), .u_wdata(c_wdata),
    .u_go(c_go), .u_mode(c_mode), .u_rd(c_rd), .u_rdata(c_rdata),
    .u_done(c_done)
  );

  fx_t  cu_re [N_CMM];
  fx_t  cu_im [N_CMM];
  logic cu_busy [N_CMM];

  for (genvar c = 0; c < N_CMM; c++) begin : g_cmm
    wire hit  = (int'(c_sel) == c);
    wire wr_a = c_wr && hit && (c_addr < AW'(16));
    wire wr_b = c_wr && hit && (c_addr >= AW'(16)) && (c_addr < AW'(32));
    logic [7:0] bin_base;
    logic [7:0] buf_bin8;
    logic       done_c;

    // Bin-base register for the buffer fill (element address 32)
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) bin_base <= '0;
      else if (c_wr && hit && c_addr == AW'(32)) bin_base <= c_wdata.re[7:0];

    cmm u_cmm (
      .clk, .rst_n,
      .real_inA(c_wdata.re), .imag_inA(c_wdata.im),
      .rowA_in(c_addr[3:2]), .colA_in(c_addr[1:0]), .weA(wr_a),
      .real_inB(c_wdata.re), .imag_inB(c_wdata.im),
      .rowB_in(c_addr[3:2]), .colB_in(c_addr[1:0]), .weB(wr_b),
      .start(c_go && hit), .src_buf(c_mode[0]), .bin_base(bin_base),
      .buf_req(br_req[c]), .buf_bin(buf_bin8), .buf_gnt(br_gnt[c]),
      .buf_rvalid(br_valid[c]), .buf_rdata(br_data),
      .rd(c_rd && hit), .rowC(c_addr[3:2]), .colC(c_addr[1:0]),
      .REAL_OUT(cu_re[c]), .IMAG_OUT(cu_im[c]),
      .busy(cu_busy[c]), .done(done_c)
    );
    assign br_bin[c] = BW'(buf_bin8);
    assign c_done[c] = done_c;
  end

  always_comb begin
    c_rdata = '0;
    for (int c = 0; c < N_CMM; c++)
      if (int'(c_sel) == c) c_rdata = '{re: cu_re[c], im: cu_im[c]};
  end

endmodule
