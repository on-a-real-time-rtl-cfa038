// tb_fft_buffer: two writers stream random bins for random microphones at
// random times, four readers request random bins; checks the fixed-priority
// write and read arbitration, that each granted read returns the four
// sign-extended microphone values of its bin one cycle later, against a
// model of the memory.
module tb_fft_buffer;
  import bss_pkg::*;
  localparam int MICS = 4, BINS = 256, NWR = 2, NRD = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic w_valid [NWR], w_ready [NWR];
  logic [1:0] w_mic [NWR];
  logic [7:0] w_bin [NWR];
  cfw_t w_data [NWR];
  logic r_req [NRD], r_gnt [NRD], r_valid [NRD];
  logic [7:0] r_bin [NRD];
  cfx_t r_data [MICS];
  cfw_t model [MICS][BINS];
  int checks = 0, failures = 0, n_wconf = 0, n_rconf = 0;

  fft_buffer #(.MICS(MICS), .BINS(BINS), .NWR(NWR), .NRD(NRD)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NWR; i++) begin w_valid[i] = 0; w_mic[i] = 0; w_bin[i] = 0; w_data[i] = '0; end
    for (int i = 0; i < NRD; i++) begin r_req[i] = 0; r_bin[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill everything through writer 0 first
    for (int m = 0; m < MICS; m++)
      for (int b = 0; b < BINS; b++) begin
        @(negedge clk);
        w_valid[0] = 1; w_mic[0] = 2'(m); w_bin[0] = 8'(b);
        w_data[0] = '{re: 24'($urandom), im: 24'($urandom)};
        model[m][b] = w_data[0];
      end
    @(negedge clk); w_valid[0] = 0;
    for (int t = 0; t < 5000; t++) begin
      automatic int wwin = -1, rwin = -1;
      for (int i = 0; i < NWR; i++) begin
        w_valid[i] = ($urandom_range(1, 0) == 1);
        w_mic[i] = 2'($urandom); w_bin[i] = 8'($urandom);
        w_data[i] = '{re: 24'($urandom), im: 24'($urandom)};
      end
      for (int i = 0; i < NRD; i++) begin
        r_req[i] = ($urandom_range(2, 0) == 0);
        r_bin[i] = 8'($urandom);
      end
      #1;
      for (int i = NWR - 1; i >= 0; i--) if (w_valid[i]) wwin = i;
      for (int i = NRD - 1; i >= 0; i--) if (r_req[i]) rwin = i;
      if (w_valid[0] && w_valid[1]) n_wconf++;
      begin
        automatic int nreq = 0;
        for (int i = 0; i < NRD; i++) nreq += int'(r_req[i]);
        if (nreq > 1) n_rconf++;
      end
      for (int i = 0; i < NWR; i++) begin
        checks++;
        if (w_ready[i] != (i == wwin)) failures++;
      end
      for (int i = 0; i < NRD; i++) begin
        checks++;
        if (r_gnt[i] != (i == rwin)) failures++;
      end
      @(posedge clk);
      #1;
      // the read granted at this edge sees the memory before this edge's write
      for (int i = 0; i < NRD; i++) begin
        checks++;
        if (r_valid[i] != (i == rwin)) failures++;
      end
      if (rwin >= 0)
        for (int m = 0; m < MICS; m++) begin
          checks++;
          if (r_data[m].re !== DW'(model[m][r_bin[rwin]].re) ||
              r_data[m].im !== DW'(model[m][r_bin[rwin]].im)) failures++;
        end
      if (wwin >= 0) model[w_mic[wwin]][w_bin[wwin]] = w_data[wwin];
      @(negedge clk);
    end
    checks += 2;
    if (n_wconf == 0 || n_rconf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
