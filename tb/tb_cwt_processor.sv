// End-to-end testbench of the CWT processor at its full size (N = 4096,
// scales 26..50), with no parameter overrides.
//
// Two runs. Each input is a slow "breathing" sinusoid, plus a burst of a
// faster oscillation standing for a body-movement artifact, plus noise, in
// 20-bit samples. The expected coefficients are computed here in floating
// point: X = DFT(x)/N at bins 40..709, the product with each scale's stored
// Morlet sample, and the inverse DFT over the kept bins of that scale. Every
// one of the 25 x 4096 complex outputs is compared, within a tolerance for the
// fixed-point FFTs. Between the runs the wavelet memory is reloaded through
// its write port. The testbench also checks the cycle count of a run and
// counts the design's mechanisms: capture overlapping the multiplication,
// RAM4 read and written in the same cycle, zeros inserted before the IFFT,
// back-to-back IFFT frames, and the reload.
module tb_cwt_processor;
  import cwt_pkg::*;

  localparam real PI = 3.14159265358979;
  // cycles from the first FFT sample to the last coefficient:
  // FFT latency to bin 0 (2N+13), bins up to 204, one cycle to start,
  // 6144 reads, 3 cycles to the last write, 2 cycles to the first IFFT
  // sample, 25 frames, IFFT latency to bin 0 (2N+13).
  localparam int EXP_CYCLES = (2*N + LOG2N + 1) + MULT_START_BIN + 1 + PROD_DEPTH + 3 + 2
                              + NSCALE * N + (2*N + LOG2N + 1);

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic start, busy, done, x_valid, x_ready, wav_we, cwt_valid;
  logic [31:0] cycle_count;
  logic signed [DW-1:0] x_data;
  logic [PROD_AW-1:0] wav_addr;
  logic [WW-1:0] wav_data;
  logic [SCALE_W-1:0] cwt_scale;
  logic [LOG2N-1:0] cwt_time;
  logic signed [PW-1:0] cwt_re, cwt_im;

  cwt_processor dut (.*);

  int checks = 0, failures = 0;

  // ---------------------------------------------------------- references
  int  xs [N];
  real cs [N], sn [N];
  real xr_ref [BIN_HI+1], xi_ref [BIN_HI+1];
  real er [NSCALE][N], ei [NSCALE][N];

  function automatic int gen_sample(int run, int n);
    real t, v;
    t = real'(n) / FS_HZ;
    v = 60000.0 * $sin(2.0 * PI * 0.3 * t + real'(run));
    if (n >= 1500 + 700 * run && n < 1800 + 700 * run)
      v += 90000.0 * $sin(2.0 * PI * (9.0 + 4.0 * run) * t);
    v += real'(int'($urandom_range(0, 4000)) - 2000);
    return int'(v);
  endfunction

  task automatic build_reference(int run);
    for (int n = 0; n < N; n++) xs[n] = gen_sample(run, n);
    for (int k = BIN_LO; k <= BIN_HI; k++) begin
      real a, b;
      a = 0.0; b = 0.0;
      for (int n = 0; n < N; n++) begin
        a += real'(xs[n]) * cs[(n * k) % N];
        b -= real'(xs[n]) * sn[(n * k) % N];
      end
      xr_ref[k] = a / real'(N);
      xi_ref[k] = b / real'(N);
    end
    for (int j = 0; j < NSCALE; j++)
      for (int t = 0; t < N; t++) begin
        real a, b;
        a = 0.0; b = 0.0;
        for (int k = SCALE_START[j]; k < SCALE_START[j] + SCALE_LEN[j]; k++) begin
          real w, pr, pi_;
          int idx;
          w = real'(morlet_sample(j, k));
          pr = xr_ref[k] * w;
          pi_ = xi_ref[k] * w;
          idx = (k * t) % N;
          a += pr * cs[idx] - pi_ * sn[idx];
          b += pr * sn[idx] + pi_ * cs[idx];
        end
        er[j][t] = a / real'(N);
        ei[j][t] = b / real'(N);
      end
  endtask

  // ----------------------------------------------------- mechanism counters
  int n_overlap = 0, n_rw_same_cycle = 0, n_zero_fed = 0, n_frames_b2b = 0, n_reload = 0;
  logic prev_eop = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (dut.ram12_we && dut.ram12_re) n_overlap++;
    if (dut.ram4_we && dut.ram4_re && !dut.ram4_wsel_load) n_rw_same_cycle++;
    if (dut.ifft_sink_valid && dut.ifft_zero) n_zero_fed++;
    if (prev_eop && dut.ifft_sink_valid && dut.ifft_sink_sop) n_frames_b2b++;
    prev_eop <= dut.ifft_sink_valid && dut.ifft_sink_eop;
    if (wav_we && !busy) n_reload++;
  end

  // ------------------------------------------------------------- checking
  real max_err, peak;
  int  n_out;
  localparam real TOL_REL = 2.0e-3;

  always @(negedge clk) if (rst_n && cwt_valid) begin
    real d;
    if (int'(cwt_scale) < NSCALE) begin
      d = real'(cwt_re) - er[cwt_scale][cwt_time]; if (d < 0) d = -d;
      if (d > max_err) max_err = d;
      checks++;
      if (d > TOL_REL * peak + 16.0) begin
        failures++;
        if (failures < 10) $display("scale %0d t %0d re %0d expected %f", cwt_scale, cwt_time, cwt_re, er[cwt_scale][cwt_time]);
      end
      d = real'(cwt_im) - ei[cwt_scale][cwt_time]; if (d < 0) d = -d;
      if (d > max_err) max_err = d;
      checks++;
      if (d > TOL_REL * peak + 16.0) begin
        failures++;
        if (failures < 10) $display("scale %0d t %0d im %0d expected %f", cwt_scale, cwt_time, cwt_im, ei[cwt_scale][cwt_time]);
      end
    end else begin
      failures++;
    end
    n_out++;
  end

  task automatic do_run(int run);
    longint t0;
    build_reference(run);
    peak = 0.0;
    for (int j = 0; j < NSCALE; j++)
      for (int t = 0; t < N; t++) begin
        if (er[j][t] > peak) peak = er[j][t];
        if (-er[j][t] > peak) peak = -er[j][t];
      end
    max_err = 0.0; n_out = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int n = 0; n < N; n++) begin
      x_valid = 1'b1;
      x_data  = DW'(xs[n]);
      while (!x_ready) @(negedge clk);
      @(negedge clk);
    end
    x_valid = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (n_out != NSCALE * N) begin
      failures++;
      $display("run %0d: %0d coefficients, expected %0d", run, n_out, NSCALE * N);
    end
    checks++;
    if (cycle_count != 32'(EXP_CYCLES)) begin
      failures++;
      $display("run %0d: %0d cycles, expected %0d", run, cycle_count, EXP_CYCLES);
    end
    $display("run %0d: %0d cycles (document's total: 125307), peak %f, max error %f",
             run, cycle_count, peak, max_err);
  endtask

  task automatic reload_wavelets();
    wav_we = 1'b1;
    for (int j = 0; j < NSCALE; j++)
      for (int l = 0; l < SCALE_LEN[j]; l++) begin
        wav_addr = PROD_AW'(SCALE_OFF[j] + l);
        wav_data = morlet_sample(j, SCALE_START[j] + l);
        @(negedge clk);
      end
    wav_we = 1'b0;
  endtask

  initial begin
    start = 1'b0; x_valid = 1'b0; x_data = '0; wav_we = 1'b0; wav_addr = '0; wav_data = '0;
    #1 rst_n = 1'b0;  // falling edge before the first clock: the asynchronous reset acts at once
    for (int n = 0; n < N; n++) begin
      cs[n] = $cos(2.0 * PI * real'(n) / real'(N));
      sn[n] = $sin(2.0 * PI * real'(n) / real'(N));
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    do_run(0);
    reload_wavelets();
    do_run(1);
    $display("mechanisms: capture/multiply overlap %0d, RAM4 read+write %0d, zeros fed %0d, back-to-back IFFT frames %0d, reload writes %0d",
             n_overlap, n_rw_same_cycle, n_zero_fed, n_frames_b2b, n_reload);
    checks += 5;
    if (n_overlap == 0) failures++;
    if (n_rw_same_cycle == 0) failures++;
    if (n_zero_fed == 0) failures++;
    if (n_frames_b2b != 2 * (NSCALE - 1)) failures++;
    if (n_reload != PROD_DEPTH) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("tb_cwt_processor: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
