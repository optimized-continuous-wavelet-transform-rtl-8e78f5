// Self-checking testbench of the streaming FFT/IFFT core: a forward and an
// inverse 64-point core (20 and 28 bits) with back-to-back frames and a frame
// after a gap, and one forward frame at the full 4096 points, 20 bits. Every
// bin is compared with a floating-point DFT; the latency to bin 0 is checked.
module tb_fft_stream;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;

  fft_harness #(.W(20), .LOG2N(6),  .INVERSE(1'b0), .NFRAMES(4)) h_fwd  (.clk, .rst_n, .checks(c0), .failures(f0), .done(d0));
  fft_harness #(.W(28), .LOG2N(6),  .INVERSE(1'b1), .NFRAMES(3)) h_inv  (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));
  fft_harness #(.W(20), .LOG2N(12), .INVERSE(1'b0), .NFRAMES(1)) h_full (.clk, .rst_n, .checks(c2), .failures(f2), .done(d2));

  int checks, failures;
  initial begin
    #1 rst_n = 1'b0;  // falling edge before the first clock: the asynchronous reset acts at once
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("tb_fft_stream: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
