// bss_block_run: drives one accelerator instance through the hardware part
// of one complete processing block, the way the host software would, and
// counts its clock cycles. Used by tb_block_throughput to compare instance
// configurations.
//
// Workload (four microphones, 256-sample block, 256 bins):
//   A. forward FFT of the four microphone frames, streamed into the FFT
//      buffer; frames are spread over the N_FFT units, and a unit is only
//      reloaded once the status word shows it idle;
//   B. filtering of every bin k: the matrix unit k % N_CMM gets the bin's
//      own 4x4 unmixing matrix W(k), fills B from the buffer at bin k and
//      returns the four separated outputs Y_i(k) = sum_m W(k)[i][m] X_m(k)
//      (column 0 of C); bins are handed out N_CMM at a time, the results
//      read back after the whole group is started;
//   C. inverse FFT of the target output Y_0 and read-back of its samples.
// Results are checked against a double-precision model (DFT, matrix
// product, inverse DFT) within a tolerance for the fixed-point rounding.
// Outputs: cycles of each phase, the largest deviation from the model of
// the separated outputs Y and of the time-domain output (in Q12.20 LSBs),
// checks and failures, and finished.
module bss_block_run
  import bss_pkg::*;
#(
  parameter int N_FFT = 2,
  parameter int N_CMM = 5,
  parameter int SEED  = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   cyc_fft,
  output int   cyc_filter,
  output int   cyc_ifft,
  output int   checks,
  output int   failures,
  output real  max_err_y,
  output real  max_err_t,
  output logic finished
);
  localparam int N = 256, MICS = 4;
  localparam real PI2 = 6.283185307179586;
  localparam real TOL = 64.0;   // LSBs of Q12.20

  logic        fft_instr_valid, fft_ld_valid, fft_irq_en;
  fcb_instr_t  fft_instr;
  logic [31:0] fft_ld_data, fft_st_data;
  logic        fft_instr_ready, fft_ld_ready, fft_ld_written, fft_st_valid, fft_irq, fft_result_ready;
  fcb_state_e  fft_fsm_state;
  logic        cmm_instr_valid, cmm_ld_valid, cmm_irq_en;
  fcb_instr_t  cmm_instr;
  logic [31:0] cmm_ld_data, cmm_st_data;
  logic        cmm_instr_ready, cmm_ld_ready, cmm_ld_written, cmm_st_valid, cmm_irq, cmm_result_ready;
  fcb_state_e  cmm_fsm_state;

  bss_accelerator #(.N_FFT(N_FFT), .N_CMM(N_CMM)) dut (.*);

  int cycle = 0;
  always_ff @(posedge clk) cycle <= cycle + 1;

  task automatic issue(input int ch, input fcb_instr_t ins);
    @(negedge clk);
    if (ch == 0) begin fft_instr_valid = 1; fft_instr = ins; end
    else         begin cmm_instr_valid = 1; cmm_instr = ins; end
    @(posedge clk);
    while (!(ch == 0 ? fft_instr_ready : cmm_instr_ready)) @(posedge clk);
    @(negedge clk);
    fft_instr_valid = 0; cmm_instr_valid = 0;
  endtask

  task automatic load12(input int ch, input int unit, input int addr, input bit go,
                        input logic [3:0] mode, input cfx_t v [12]);
    int w = 0;
    issue(ch, '{op: FCB_LOAD, go: go, mode: mode, unit: 3'(unit), addr: AW'(addr)});
    while (w < 24) begin
      logic [31:0] d = (w % 2 == 0) ? v[w / 2].re : v[w / 2].im;
      if (ch == 0) begin fft_ld_valid = 1; fft_ld_data = d; end
      else         begin cmm_ld_valid = 1; cmm_ld_data = d; end
      @(posedge clk);
      if (ch == 0 ? fft_ld_ready : cmm_ld_ready) w++;
      @(negedge clk);
    end
    fft_ld_valid = 0; cmm_ld_valid = 0;
  endtask

  task automatic store1(input int ch, input int unit, input int addr, output cfx_t v);
    int nb = 0, guard = 0;
    issue(ch, '{op: FCB_STORE, go: 1'b0, mode: 4'd0, unit: 3'(unit), addr: AW'(addr)});
    while (nb < 2 && guard < 5000) begin
      if (ch == 0 ? fft_st_valid : cmm_st_valid) begin
        if (nb == 0) v.re = (ch == 0) ? fft_st_data : cmm_st_data;
        else         v.im = (ch == 0) ? fft_st_data : cmm_st_data;
        nb++;
      end
      @(negedge clk);
      guard++;
    end
    checks++;
    if (nb != 2) failures++;
  endtask

  // poll the status word until the given units are idle
  task automatic wait_idle(input int ch, input logic [7:0] mask);
    cfx_t s;
    int guard = 0;
    do begin
      store1(ch, 0, int'(STATUS_ADDR), s);
      guard++;
    end while ((s.re[15:8] & mask) != 0 && guard < 10000);
    checks++;
    if ((s.re[15:8] & mask) != 0) failures++;
  endtask

  task automatic fft_frame(input int unit, input logic [3:0] mode, input cfx_t smp [N]);
    cfx_t v [12];
    for (int blk = 0; blk < 22; blk++) begin
      for (int i = 0; i < 12; i++) v[i] = (blk * 12 + i < N) ? smp[blk * 12 + i] : '0;
      load12(0, unit, blk * 12, blk == 21, mode, v);
    end
  endtask

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  function automatic real fmax(input real a, input real b);
    return (a > b) ? a : b;
  endfunction

  real  x [MICS][N];
  real  xr [MICS][N], xi [MICS][N];     // reference spectra (DFT / N)
  cfx_t W [N][MDIM][MDIM];
  real  yr [MDIM][N], yi [MDIM][N];     // reference outputs
  cfx_t y0 [N];

  initial begin
    cfx_t smp [N];
    cfx_t v [12];
    cfx_t r;
    int t0;
    int seed = SEED;
    checks = 0; failures = 0; finished = 0;
    cyc_fft = 0; cyc_filter = 0; cyc_ifft = 0;
    max_err_y = 0.0; max_err_t = 0.0;
    fft_instr_valid = 0; fft_ld_valid = 0; fft_irq_en = 0; fft_instr = '0; fft_ld_data = 0;
    cmm_instr_valid = 0; cmm_ld_valid = 0; cmm_irq_en = 0; cmm_instr = '0; cmm_ld_data = 0;

    // data and double-precision reference
    for (int m = 0; m < MICS; m++)
      for (int n = 0; n < N; n++)
        x[m][n] = real'($signed($random(seed)) >>> 10) + 2000000.0 * $sin(PI2 * (m + 7) * n / N);
    for (int k = 0; k < N; k++)
      for (int i = 0; i < MDIM; i++)
        for (int j = 0; j < MDIM; j++)
          W[k][i][j] = '{re: fx_t'($signed($random(seed)) >>> 12), im: fx_t'($signed($random(seed)) >>> 12)};
    for (int m = 0; m < MICS; m++)
      for (int k = 0; k < N; k++) begin
        automatic real sr = 0, si = 0;
        for (int n = 0; n < N; n++) begin
          sr += x[m][n] * $cos(PI2 * ((n * k) % N) / N);
          si -= x[m][n] * $sin(PI2 * ((n * k) % N) / N);
        end
        xr[m][k] = sr / N; xi[m][k] = si / N;
      end
    for (int k = 0; k < N; k++)
      for (int i = 0; i < MDIM; i++) begin
        automatic real sr = 0, si = 0;
        for (int m = 0; m < MICS; m++) begin
          automatic real wr = real'(W[k][i][m].re) / 1048576.0, wi = real'(W[k][i][m].im) / 1048576.0;
          sr += wr * xr[m][k] - wi * xi[m][k];
          si += wr * xi[m][k] + wi * xr[m][k];
        end
        yr[i][k] = sr; yi[i][k] = si;
      end

    @(posedge rst_n);
    repeat (2) @(negedge clk);

    // A. forward transforms into the buffer
    t0 = cycle;
    for (int m = 0; m < MICS; m++) begin
      automatic int u = m % N_FFT;
      if (m >= N_FFT) wait_idle(0, 8'(1 << u));
      for (int n = 0; n < N; n++) smp[n] = '{re: fx_t'(int'(x[m][n])), im: '0};
      fft_frame(u, {2'(m), 1'b1, 1'b0}, smp);
    end
    wait_idle(0, 8'((1 << N_FFT) - 1));
    cyc_fft = cycle - t0;

    // B. per-bin filtering, N_CMM bins at a time
    t0 = cycle;
    for (int kb = 0; kb < N; kb += N_CMM) begin
      for (int c = 0; c < N_CMM && kb + c < N; c++) begin
        automatic int k = kb + c;
        for (int i = 0; i < 12; i++) v[i] = W[k][i / 4][i % 4];
        load12(1, c, 0, 0, 4'd0, v);
        for (int i = 0; i < 12; i++) v[i] = (i < 4) ? W[k][3][i] : '0;
        load12(1, c, 12, 0, 4'd0, v);
        for (int i = 0; i < 12; i++) v[i] = '0;
        v[8] = '{re: fx_t'(k), im: '0};
        load12(1, c, 24, 1, 4'b0001, v);
      end
      for (int c = 0; c < N_CMM && kb + c < N; c++) begin
        automatic int k = kb + c;
        for (int i = 0; i < MDIM; i++) begin
          store1(1, c, i * 4, r);       // C[i][0] = Y_i(k)
          checks++;
          max_err_y = fmax(max_err_y, fmax(fabs(real'(r.re) - yr[i][k]), fabs(real'(r.im) - yi[i][k])));
          if (fabs(real'(r.re) - yr[i][k]) > TOL || fabs(real'(r.im) - yi[i][k]) > TOL) begin
            failures++;
            if (failures < 5) $display("Y%0d(%0d) got %0d %0d exp %f %f", i, k, r.re, r.im, yr[i][k], yi[i][k]);
          end
          if (i == 0) y0[k] = r;
        end
      end
    end
    cyc_filter = cycle - t0;

    // C. inverse transform of the target output
    t0 = cycle;
    for (int k = 0; k < N; k++) smp[k] = y0[k];
    fft_frame(0, 4'b0001, smp);
    wait_idle(0, 8'b1);
    for (int n = 0; n < N; n++) begin
      automatic real sr = 0, si = 0;
      store1(0, 0, n, r);
      for (int k = 0; k < N; k++) begin
        automatic real c = $cos(PI2 * ((n * k) % N) / N), s = $sin(PI2 * ((n * k) % N) / N);
        sr += real'(y0[k].re) * c - real'(y0[k].im) * s;
        si += real'(y0[k].re) * s + real'(y0[k].im) * c;
      end
      checks++;
      max_err_t = fmax(max_err_t, fmax(fabs(real'(r.re) - sr / N), fabs(real'(r.im) - si / N)));
      if (fabs(real'(r.re) - sr / N) > 24.0 || fabs(real'(r.im) - si / N) > 24.0) failures++;
    end
    cyc_ifft = cycle - t0;
    finished = 1;
  end
endmodule
