// tb_bss_accelerator: end-to-end test of the accelerator at its default
// size (two 256-point FFT/IFFT units, five 4x4 matrix multipliers, four
// microphones), driven through its two coprocessor-bus channels the way the
// host processor's software would drive it:
//   1. four microphone frames are transformed, two units at a time, each
//      streaming its spectrum into the FFT buffer (the two streams contend
//      for the buffer); completion is detected by polling and by interrupt;
//   2. bins of each spectrum are read back and checked against a
//      double-precision DFT;
//   3. all five matrix multipliers are started back to back, each filling
//      B with four bins of microphone vectors from the buffer and computing
//      W * [X(k) .. X(k+3)] for its own random W; one of them with values
//      that saturate; one more run loads B itself (the buffer bypassed);
//      results are checked exactly against integer arithmetic on the
//      read-back spectra; stores to a busy unit go through the WAIT state;
//   4. one spectrum is sent back through the inverse FFT and compared with
//      the original frame scaled by 1/N.
// Each of these mechanisms is counted and must occur at least once.
module tb_bss_accelerator;
  import bss_pkg::*;
  localparam int N = 256, MICS = 4, NCMM = 5;
  localparam real PI2 = 6.283185307179586;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        fft_instr_valid = 0, fft_ld_valid = 0, fft_irq_en = 0;
  fcb_instr_t  fft_instr = '0;
  logic [31:0] fft_ld_data = 0, fft_st_data;
  logic        fft_instr_ready, fft_ld_ready, fft_ld_written, fft_st_valid, fft_irq, fft_result_ready;
  fcb_state_e  fft_fsm_state;
  logic        cmm_instr_valid = 0, cmm_ld_valid = 0, cmm_irq_en = 0;
  fcb_instr_t  cmm_instr = '0;
  logic [31:0] cmm_ld_data = 0, cmm_st_data;
  logic        cmm_instr_ready, cmm_ld_ready, cmm_ld_written, cmm_st_valid, cmm_irq, cmm_result_ready;
  fcb_state_e  cmm_fsm_state;

  bss_accelerator dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_buf_stall = 0, n_fft_par = 0, n_cmm_par = 0, n_wait_fft = 0, n_wait_cmm = 0;
  int n_poll = 0, n_irq = 0, n_sat = 0, n_fetch = 0, n_bypass = 0, n_ifft = 0;

  always_ff @(posedge clk) if (rst_n) begin
    if (dut.bw_valid[1] && !dut.bw_ready[1]) n_buf_stall++;
    if (dut.fu_busy[0] && dut.fu_busy[1]) n_fft_par++;
    // one matrix unit computes while another one is being loaded
    begin
      automatic int nb = 0;
      for (int c = 0; c < NCMM; c++) nb += int'(dut.cu_busy[c]);
      if (nb >= 1 && dut.c_wr && !dut.cu_busy[dut.c_sel]) n_cmm_par++;
    end
    if (dut.g_cmm[0].u_cmm.u_ctrl.colwr_en) n_fetch++;
    if (fft_fsm_state == FCB_WAIT) n_wait_fft++;
    if (cmm_fsm_state == FCB_WAIT) n_wait_cmm++;
  end

  // ---------------- processor-side bus tasks ----------------
  task automatic issue(input int ch, input fcb_instr_t ins);
    @(negedge clk);
    if (ch == 0) begin fft_instr_valid = 1; fft_instr = ins; end
    else         begin cmm_instr_valid = 1; cmm_instr = ins; end
    @(posedge clk);
    while (!(ch == 0 ? fft_instr_ready : cmm_instr_ready)) @(posedge clk);
    @(negedge clk);
    fft_instr_valid = 0; cmm_instr_valid = 0;
  endtask

  // LOAD of 12 complex elements (96 bytes)
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

  // STORE of one element (8 bytes)
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

  // wait for units of a channel: by polling the status word or by interrupt
  task automatic wait_units(input int ch, input logic [7:0] mask, input bit use_irq);
    cfx_t s;
    int guard = 0;
    logic [7:0] seen = '0;
    if (use_irq) begin
      if (ch == 0) fft_irq_en = 1; else cmm_irq_en = 1;
    end
    while ((seen & mask) != mask && guard < 5000) begin
      if (use_irq) begin
        while (!(ch == 0 ? fft_irq : cmm_irq) && guard < 200000) begin @(negedge clk); guard++; end
        n_irq++;
      end
      store1(ch, 0, int'(STATUS_ADDR), s);
      n_poll++;
      seen |= s.re[7:0];
      guard++;
    end
    fft_irq_en = 0; cmm_irq_en = 0;
    checks++;
    if ((seen & mask) != mask) begin
      failures++;
      $display("channel %0d: units %b never reported done (saw %b)", ch, mask, seen);
    end
  endtask

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  // ---------------- data ----------------
  real  x [MICS][N];               // microphone frames
  cfx_t spec [MICS][N];            // spectra as read back
  bit   have [MICS][N];
  int   kbase [NCMM + 1];
  cfx_t W [NCMM + 1][MDIM][MDIM];
  cfx_t Bm [MDIM][MDIM];

  function automatic fx_t clamp(input logic signed [127:0] s, ref int sat);
    logic signed [127:0] q = s >>> 20;
    if (q > 128'sd2147483647) begin sat++; return 32'sh7fffffff; end
    if (q < -128'sd2147483648) begin sat++; return 32'sh80000000; end
    return q[31:0];
  endfunction

  task automatic fft_frame(input int unit, input int m, input bit to_buf, input bit inv,
                           input cfx_t smp [N], input int first = 0, input int last = 21);
    cfx_t v [12];
    for (int blk = first; blk <= last; blk++) begin
      for (int i = 0; i < 12; i++) v[i] = (blk * 12 + i < N) ? smp[blk * 12 + i] : '0;
      load12(0, unit, blk * 12, blk == 21, {2'(m), to_buf, inv}, v);
    end
  endtask

  task automatic check_bin(input int m, input int k);
    real sr = 0, si = 0;
    for (int n = 0; n < N; n++) begin
      sr += x[m][n] * $cos(PI2 * ((n * k) % N) / N);
      si -= x[m][n] * $sin(PI2 * ((n * k) % N) / N);
    end
    sr /= N; si /= N;
    checks++;
    if (fabs(real'(spec[m][k].re) - sr) > 24.0 || fabs(real'(spec[m][k].im) - si) > 24.0) begin
      failures++;
      if (failures < 6) $display("mic %0d bin %0d got %0d %0d exp %f %f", m, k, spec[m][k].re, spec[m][k].im, sr, si);
    end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfx_t smp [N];
    cfx_t v [12];
    cfx_t r;
    for (int m = 0; m < MICS; m++) for (int k = 0; k < N; k++) have[m][k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c <= NCMM; c++) kbase[c] = int'($urandom_range(N - 4, 0));
    kbase[2] = 3;   // the bins of the microphone tones: drives unit 2 into saturation
    for (int m = 0; m < MICS; m++)
      for (int n = 0; n < N; n++)
        x[m][n] = real'($signed($urandom) >>> 10) + 3000000.0 * $sin(PI2 * (m + 3) * n / N);

    // 1-2. transform the microphones, two units in parallel
    for (int pass = 0; pass < 2; pass++) begin
      // load both frames, holding back the last block of each so that the
      // two units start close together and their streams contend
      for (int u = 0; u < 2; u++) begin
        automatic int m = pass * 2 + u;
        for (int n = 0; n < N; n++) smp[n] = '{re: fx_t'(int'(x[m][n])), im: '0};
        fft_frame(u, m, 1'b1, 1'b0, smp, 0, 20);
      end
      for (int u = 0; u < 2; u++) begin
        automatic int m = pass * 2 + u;
        for (int n = 0; n < N; n++) smp[n] = '{re: fx_t'(int'(x[m][n])), im: '0};
        fft_frame(u, m, 1'b1, 1'b0, smp, 21, 21);
      end
      // a store while unit 1 still computes waits for its result
      store1(0, 1, 0, r);
      wait_units(0, 8'b11, pass == 1);
      for (int u = 0; u < 2; u++) begin
        automatic int m = pass * 2 + u;
        for (int c = 0; c <= NCMM; c++)
          for (int j = 0; j < 4; j++)
            if (!have[m][kbase[c] + j]) begin
              store1(0, u, kbase[c] + j, spec[m][kbase[c] + j]);
              have[m][kbase[c] + j] = 1;
              check_bin(m, kbase[c] + j);
            end
      end
    end

    // 3. five matrix multipliers fed from the buffer, started back to back
    for (int c = 0; c <= NCMM; c++)
      for (int i = 0; i < MDIM; i++)
        for (int j = 0; j < MDIM; j++) begin
          W[c][i][j].re = fx_t'($signed($urandom) >>> 10);
          W[c][i][j].im = fx_t'($signed($urandom) >>> 10);
          if (c == 2) W[c][i][j] = '{re: 32'sh7fffffff, im: 32'sh7fffffff};  // saturating run
        end
    for (int c = 0; c < NCMM; c++) begin
      for (int i = 0; i < 12; i++) v[i] = W[c][i / 4][i % 4];
      load12(1, c, 0, 0, 4'd0, v);
      for (int i = 0; i < 12; i++) v[i] = (i < 4) ? W[c][3][i] : '0;
      load12(1, c, 12, 0, 4'd0, v);
      for (int i = 0; i < 12; i++) v[i] = '0;
      v[8] = '{re: fx_t'(kbase[c]), im: '0};     // element 32: bin base
      load12(1, c, 24, 1, 4'b0001, v);
    end
    // sixth product on unit 0 with B loaded directly (buffer bypassed)
    for (int i = 0; i < MDIM; i++)
      for (int j = 0; j < MDIM; j++) Bm[i][j] = '{re: fx_t'($signed($urandom) >>> 10), im: fx_t'($signed($urandom) >>> 10)};

    for (int c = 0; c <= NCMM; c++) begin
      automatic int unit = (c == NCMM) ? 0 : c;
      if (c == NCMM) begin
        for (int i = 0; i < 12; i++) v[i] = W[c][i / 4][i % 4];
        load12(1, 0, 0, 0, 4'd0, v);
        for (int i = 0; i < 12; i++) v[i] = (i < 4) ? W[c][3][i] : Bm[(i - 4) / 4][(i - 4) % 4];
        load12(1, 0, 12, 0, 4'd0, v);
        for (int i = 0; i < 12; i++) v[i] = (i < 8) ? Bm[2 + i / 4][i % 4] : '0;
        load12(1, 0, 24, 1, 4'b0000, v);
        n_bypass++;
      end
      if (c == 1) wait_units(1, 8'b0001_1110, 1'b1);
      for (int i = 0; i < MDIM; i++)
        for (int j = 0; j < MDIM; j++) begin
          automatic logic signed [127:0] sr = 0, si = 0;
          for (int k = 0; k < MDIM; k++) begin
            automatic cfx_t b = (c == NCMM) ? Bm[k][j] : spec[k][kbase[c] + j];
            sr += 128'(W[c][i][k].re) * 128'(b.re) - 128'(W[c][i][k].im) * 128'(b.im);
            si += 128'(W[c][i][k].re) * 128'(b.im) + 128'(W[c][i][k].im) * 128'(b.re);
          end
          store1(1, unit, i * 4 + j, r);
          checks++;
          if (r.re !== clamp(sr, n_sat) || r.im !== clamp(si, n_sat)) begin
            failures++;
            if (failures < 12) $display("cmm %0d C[%0d][%0d] got %h %h", c, i, j, r.re, r.im);
          end
        end
    end

    // 4. inverse transform of mic 3's spectrum (still in FFT unit 1)
    for (int k = 0; k < N; k++) store1(0, 1, k, smp[k]);
    fft_frame(1, 3, 1'b0, 1'b1, smp);
    wait_units(0, 8'b10, 1'b0);
    n_ifft++;
    for (int n = 0; n < N; n += 5) begin
      store1(0, 1, n, r);
      checks++;
      if (fabs(real'(r.re) - x[3][n] / N) > 24.0 || fabs(real'(r.im)) > 24.0) failures++;
    end

    // every mechanism must have happened
    $display("buffer stalls %0d, parallel fft %0d, parallel cmm %0d, wait fft %0d, wait cmm %0d",
             n_buf_stall, n_fft_par, n_cmm_par, n_wait_fft, n_wait_cmm);
    $display("polls %0d, irqs %0d, saturated %0d, buffer fills %0d, bypass %0d, ifft %0d",
             n_poll, n_irq, n_sat, n_fetch, n_bypass, n_ifft);
    checks += 11;
    if (n_buf_stall == 0) failures++;
    if (n_fft_par == 0) failures++;
    if (n_cmm_par == 0) failures++;
    if (n_wait_fft == 0) failures++;
    if (n_wait_cmm == 0) failures++;
    if (n_poll == 0) failures++;
    if (n_irq == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_fetch == 0) failures++;
    if (n_bypass == 0) failures++;
    if (n_ifft == 0) failures++;
    $display("finished at cycle %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
