// Self-checking testbench of the control module on its own. Simple models
// stand in for the datapath: the FFT answers 2N+13 cycles after the first
// sample with N bins in natural order, the multipliers return out_valid one
// cycle after in_valid, the IFFT returns N outputs per frame 2N+13 cycles
// after each frame starts. The testbench checks, against its own copy of the
// scale table:
//  - x_ready for exactly N cycles, FFT sop on the first and eop on the last;
//  - RAM1/RAM2 written for bins 40..709 only, at bin-40;
//  - the first multiplication read exactly one cycle after bin 204 is
//    written, then 6144 reads of (bin of scale j, word i) in order;
//  - RAM3 and RAM4 written at word i exactly three cycles after word i was
//    read;
//  - 25 back-to-back IFFT frames, sample k of frame j read from word
//    offset_j + k - start_j in_band the scale's bins and zero outside;
//  - the coefficient tags, done and cycle_count.
module tb_cwt_control;
  import cwt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic start, busy, done, x_valid, x_ready;
  logic [31:0] cycle_count;
  logic fft_ready, fft_sink_valid, fft_sink_sop, fft_sink_eop, fft_src_valid, fft_src_sop;
  logic ram12_we, ram12_re;
  logic [BIN_AW-1:0] ram12_waddr, ram12_raddr;
  logic mult_ce, mult_in_valid, mult_out_valid;
  logic ram4_re, ram4_we, ram4_wsel_load, wav_we;
  logic [PROD_AW-1:0] ram4_raddr, ram4_waddr, wav_addr;
  logic ram3_re, ram3_we;
  logic [PROD_AW-1:0] ram3_raddr, ram3_waddr;
  logic ifft_ready, ifft_sink_valid, ifft_sink_sop, ifft_sink_eop, ifft_zero, ifft_src_valid;
  logic cwt_valid;
  logic [SCALE_W-1:0] cwt_scale;
  logic [LOG2N-1:0] cwt_time;

  cwt_control dut (.*);

  localparam int LAT = 2 * N + LOG2N + 1;
  int st [25] = '{204, 191, 178, 166, 155, 145, 135, 126, 118, 110, 103, 96, 90,
                  84, 78, 73, 68, 64, 60, 56, 52, 49, 46, 43, 40};
  int ln [25] = '{506, 472, 440, 411, 384, 358, 334, 312, 291, 271, 253, 236, 220,
                  205, 192, 179, 167, 156, 145, 135, 127, 118, 110, 102, 20};
  int off [25];

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 15) $display("cycle %0d: %s", cyc, what);
    end
  endtask

  // ---------------------------------------------------------------- models
  longint fft_first = -1, ifft_first = -1;
  int ifft_frames_in = 0;
  always_comb begin
    fft_src_valid  = (fft_first >= 0) && (cyc >= fft_first + LAT) && (cyc < fft_first + LAT + N);
    fft_src_sop    = fft_src_valid && (cyc == fft_first + LAT);
    ifft_src_valid = (ifft_first >= 0) && (cyc >= ifft_first + LAT) &&
                     (cyc < ifft_first + LAT + longint'(ifft_frames_in) * N);
  end
  assign fft_ready  = (fft_first < 0) || (cyc <= fft_first);
  assign ifft_ready = (ifft_first < 0) || (cyc <= ifft_first);
  logic mv_q = 1'b0;
  always @(posedge clk) if (mult_ce) mv_q <= mult_in_valid;
  assign mult_out_valid = mv_q;

  // ------------------------------------------------------------ scoreboard
  int n_in = 0, n_cap = 0, n_rd = 0, n_wr = 0, n_feed = 0, n_out = 0;
  longint t_bin204 = -1;
  longint t_read [PROD_DEPTH];
  int fbin = 0;      // bin of the current FFT model output
  int rj = 0, rl = 0; // expected multiplication read position

  always @(negedge clk) if (rst_n) begin
    // input
    if (fft_sink_valid) begin
      if (n_in == 0) begin fft_first = cyc; expect_true(fft_sink_sop, "first sample without sop"); end
      else expect_true(!fft_sink_sop, "sop in_band frame");
      expect_true(fft_sink_eop == (n_in == N - 1), "eop placement");
      n_in++;
    end
    // capture
    if (fft_src_valid) begin
      bit want;
      want = (fbin >= 40) && (fbin <= 709);
      expect_true(ram12_we == want, $sformatf("RAM1/2 write enable at bin %0d", fbin));
      if (want) begin
        expect_true(int'(ram12_waddr) == fbin - 40, "RAM1/2 write address");
        n_cap++;
      end
      if (fbin == 204) t_bin204 = cyc;
      fbin++;
    end else begin
      expect_true(!ram12_we, "RAM1/2 written without FFT output");
    end
    // multiplication reads
    if (ram12_re) begin
      if (n_rd == 0) expect_true(cyc == t_bin204 + 1, "first product read not one cycle after bin 204");
      expect_true(int'(ram12_raddr) == st[rj] + rl - 40, "RAM1/2 read address");
      expect_true(ram4_re && int'(ram4_raddr) == n_rd, "RAM4 read address");
      t_read[n_rd] = cyc;
      n_rd++;
      rl++;
      if (rl == ln[rj]) begin rl = 0; rj++; end
    end
    // product writes
    if (ram3_we) begin
      expect_true(ram4_we && !ram4_wsel_load && ram4_waddr == ram3_waddr, "RAM3/RAM4 written together");
      expect_true(int'(ram3_waddr) == n_wr, "product write address");
      expect_true(cyc == t_read[n_wr] + 3, "product written three cycles after its read");
      n_wr++;
    end
    // IFFT feed
    if (ifft_sink_valid) begin
      int j, k;
      bit in_band;
      j = n_feed / N; k = n_feed % N;
      if (n_feed == 0) ifft_first = cyc;
      if (k == 0) ifft_frames_in++;
      in_band = (k >= st[j]) && (k < st[j] + ln[j]);
      expect_true(ifft_sink_sop == (k == 0) && ifft_sink_eop == (k == N - 1), "IFFT framing");
      expect_true(ifft_zero == !in_band, "IFFT zero insertion");
      n_feed++;
    end
    // feed reads, one cycle ahead of the sink
    if (ram3_re && !ram12_re) begin
      int j, k;
      j = (n_feed) / N; k = (n_feed) % N;
      expect_true(int'(ram3_raddr) == off[j] + k - st[j] && ram4_raddr == ram3_raddr, "IFFT read address");
    end
    // outputs
    if (cwt_valid) begin
      expect_true(int'(cwt_scale) == n_out / N && int'(cwt_time) == n_out % N, "coefficient tags");
      n_out++;
    end
  end

  initial begin
    int o;
    o = 0;
    for (int j = 0; j < 25; j++) begin off[j] = o; o += ln[j]; end
    start = 0; x_valid = 0; wav_we = 0; wav_addr = '0;
    #1 rst_n = 1'b0;  // falling edge before the first clock: the asynchronous reset acts at once
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_true(!busy && !x_ready, "idle after reset");
    // reload port works only in idle
    wav_we = 1'b1; wav_addr = 13'd77;
    #1;
    expect_true(ram4_we && ram4_wsel_load && ram4_waddr == 13'd77, "reload write in idle");
    @(negedge clk);
    wav_we = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    x_valid = 1'b1;
    while (!done) @(negedge clk);
    expect_true(n_in == N, "N input samples");
    expect_true(n_cap == 670, "670 bins captured");
    expect_true(n_rd == PROD_DEPTH && n_wr == PROD_DEPTH, "6144 reads and writes");
    expect_true(n_feed == NSCALE * N, "25 IFFT frames");
    expect_true(n_out == NSCALE * N, "25 x N coefficients");
    expect_true(longint'(cycle_count) == ifft_first + LAT + NSCALE * N - fft_first,
                "cycle count from first FFT sample to last coefficient");
    @(negedge clk);
    expect_true(!busy, "idle after done");
    $display("cycles %0d", cycle_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("tb_cwt_control: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
