// Test harness for one fft_stream instance: sends NFRAMES random frames
// (the first NFRAMES-1 back to back, the last after a gap), checks every bin
// against a floating-point DFT computed here, and checks the latency from the
// first sample of the first frame to its bin 0 (2N + log2(N) + 1 cycles).
// Forward: X[k] = (1/N) sum x[n] exp(-j 2 pi n k / N); inverse: the same with
// exp(+j ...). The tolerance allows for 16-bit twiddles and per-stage rounding.
module fft_harness #(
  parameter int W       = 20,
  parameter int LOG2N   = 6,
  parameter bit INVERSE = 1'b0,
  parameter int NFRAMES = 3,
  parameter int AMP_BITS = W - 2
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int N = 1 << LOG2N;
  localparam real PI = 3.14159265358979;
  localparam real TOL = real'(1 << (W - 16)) + 4.0;

  logic sink_ready, sink_valid, sink_sop, sink_eop;
  logic signed [W-1:0] sink_re, sink_im;
  logic source_valid, source_sop, source_eop;
  logic signed [W-1:0] source_re, source_im;

  fft_stream #(.W(W), .LOG2N(LOG2N), .INVERSE(INVERSE)) dut (.*);

  int xr [NFRAMES][N];
  int xi [NFRAMES][N];
  real cs [N];
  real sn [N];
  longint t_first_in, t_first_out;
  longint cyc = 0;
  real max_err;

  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    checks = 0; failures = 0; done = 1'b0; max_err = 0.0;
    sink_valid = 0; sink_sop = 0; sink_eop = 0; sink_re = '0; sink_im = '0;
    t_first_in = -1; t_first_out = -1;
    for (int n = 0; n < N; n++) begin
      cs[n] = $cos(2.0 * PI * real'(n) / real'(N));
      sn[n] = $sin(2.0 * PI * real'(n) / real'(N));
    end
    for (int f = 0; f < NFRAMES; f++)
      for (int n = 0; n < N; n++) begin
        xr[f][n] = int'($urandom_range(0, (1 << (AMP_BITS + 1)) - 1)) - (1 << AMP_BITS);
        xi[f][n] = int'($urandom_range(0, (1 << (AMP_BITS + 1)) - 1)) - (1 << AMP_BITS);
      end
    wait (!rst_n); wait (rst_n);  // through one whole reset
    for (int f = 0; f < NFRAMES; f++) begin
      if (f == 0) @(negedge clk);
      if (f == NFRAMES - 1 && NFRAMES > 1) begin
        sink_valid <= 1'b0; sink_sop <= 1'b0; sink_eop <= 1'b0;
        repeat (N / 2 + 3) @(negedge clk);
      end
      while (!sink_ready) begin
        sink_valid <= 1'b0; sink_sop <= 1'b0; sink_eop <= 1'b0;
        @(negedge clk);
      end
      for (int n = 0; n < N; n++) begin
        sink_valid <= 1'b1;
        sink_sop   <= (n == 0);
        sink_eop   <= (n == N - 1);
        sink_re    <= W'(xr[f][n]);
        sink_im    <= W'(xi[f][n]);
        if (f == 0 && n == 0) t_first_in = cyc;
        @(negedge clk);
      end
    end
    sink_valid <= 1'b0; sink_sop <= 1'b0; sink_eop <= 1'b0;
    begin
    end
  end

  // Output checker.
  int of, ok_;
  initial begin
    of = 0; ok_ = 0;
    wait (!rst_n); wait (rst_n);  // through one whole reset
    forever begin
      @(negedge clk);
      if (source_valid) begin
        real er, ei, sgn, d;
        int nk;
        if (ok_ == 0 && !source_sop) begin
          failures++;
          $display("fft_harness: frame %0d does not start with sop", of);
        end
        if (of == 0 && ok_ == 0) t_first_out = cyc;
        er = 0.0; ei = 0.0;
        sgn = INVERSE ? 1.0 : -1.0;
        for (int n = 0; n < N; n++) begin
          nk = (n * ok_) % N;
          er += real'(xr[of][n]) * cs[nk] - sgn * real'(xi[of][n]) * sn[nk];
          ei += sgn * real'(xr[of][n]) * sn[nk] + real'(xi[of][n]) * cs[nk];
        end
        er /= real'(N); ei /= real'(N);
        d = (real'(source_re) - er);
        if (d < 0) d = -d;
        if (d > max_err) max_err = d;
        checks++;
        if (d > TOL) begin
          failures++;
          if (failures < 10) $display("fft_harness N=%0d inv=%0d frame %0d bin %0d re %0d expected %f", N, INVERSE, of, ok_, source_re, er);
        end
        d = (real'(source_im) - ei);
        if (d < 0) d = -d;
        if (d > max_err) max_err = d;
        checks++;
        if (d > TOL) begin
          failures++;
          if (failures < 10) $display("fft_harness N=%0d inv=%0d frame %0d bin %0d im %0d expected %f", N, INVERSE, of, ok_, source_im, ei);
        end
        if (source_eop != (ok_ == N - 1)) failures++;
        ok_++;
        if (ok_ == N) begin
          ok_ = 0; of++;
          if (of == NFRAMES) begin
            checks++;
            if (t_first_out - t_first_in != 2 * N + LOG2N + 1) begin
              failures++;
              $display("fft_harness N=%0d latency %0d, expected %0d", N, t_first_out - t_first_in, 2 * N + LOG2N + 1);
            end
            $display("fft_harness N=%0d inv=%0d W=%0d: max error %f LSB (tolerance %f)", N, INVERSE, W, max_err, TOL);
            done = 1'b1;
          end
        end
      end
    end
  end
endmodule
