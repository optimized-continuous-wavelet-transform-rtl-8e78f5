// N-point streaming fixed-point FFT / IFFT, one sample per clock.
//
// The transform is a chain of log2(N) radix-2 SDF stages (fft_sdf_stage)
// followed by a bit-reversal buffer (fft_reorder), so bins come out in natural
// order. Each stage halves its results: the forward transform returns
// DFT(x)/N, and with INVERSE = 1 (real and imaginary parts swapped on the way
// in and out) the core returns the exact inverse DFT. Both the forward FFT of
// the input signal and the IFFT of the 25 product spectra use this module.
//
// Sink side: a frame is N samples on N consecutive cycles, sink_sop on the
// first and sink_eop on the last. A frame may start only when sink_ready is
// high; frames may follow each other back to back. Source side: N bins on N
// consecutive cycles with source_sop/source_eop, no back-pressure. Latency
// from the first sample of a frame to its bin 0 is 2N + log2(N) + 1 cycles,
// so the forward transform takes N cycles to load plus N + log2(N) + 1 before
// the first bin. After the last frame the pipeline keeps running by itself
// until it is empty. The document uses an existing FFT core with this kind of
// sink/source framing (valid, start, end); its inside is this design's own.
module fft_stream #(
  parameter int W       = 20,
  parameter int LOG2N   = 12,
  parameter bit INVERSE = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                sink_ready,
  input  logic                sink_valid,
  input  logic                sink_sop,
  input  logic                sink_eop,
  input  logic signed [W-1:0] sink_re,
  input  logic signed [W-1:0] sink_im,
  output logic                source_valid,
  output logic                source_sop,
  output logic                source_eop,
  output logic signed [W-1:0] source_re,
  output logic signed [W-1:0] source_im
);
  localparam int N = 1 << LOG2N;
  localparam int TOTAL_LAG = N - 1 + LOG2N;            // sum of (D + 1) over the stages
  localparam int DRAIN     = ((TOTAL_LAG + N) / N) * N; // whole frames of self-running

  function automatic int stage_lag(int s);
    int l = 0;
    for (int t = 0; t < s; t++) l += (N >> (t + 1)) + 1;
    return l;
  endfunction

  logic [LOG2N-1:0] pos;
  logic [$clog2(DRAIN+1)-1:0] drain;
  logic en;
  logic in_frame;

  assign en         = sink_valid || (drain != '0);
  assign sink_ready = (pos == '0) && !in_frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos      <= '0;
      drain    <= '0;
      in_frame <= 1'b0;
    end else begin
      if (en) pos <= pos + 1'b1;
      if (sink_valid) drain <= ($clog2(DRAIN+1))'(DRAIN);
      else if (drain != '0) drain <= drain - 1'b1;
      if (sink_valid && sink_sop) in_frame <= 1'b1;
      if (sink_valid && sink_eop) in_frame <= 1'b0;
    end
  end

  // Sink framing rules.
  a_sop_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    sink_valid && sink_sop |-> pos == '0);
  a_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    sink_valid && !sink_eop |=> sink_valid);
  a_eop_place: assert property (@(posedge clk) disable iff (!rst_n)
    sink_valid |-> (sink_eop == (pos == LOG2N'(N - 1))));

  logic                v   [LOG2N+1];
  logic signed [W-1:0] re  [LOG2N+1];
  logic signed [W-1:0] im  [LOG2N+1];

  assign v[0]  = sink_valid;
  assign re[0] = INVERSE ? sink_im : sink_re;
  assign im[0] = INVERSE ? sink_re : sink_im;

  for (genvar s = 0; s < LOG2N; s++) begin : g_stage
    fft_sdf_stage #(
      .W(W), .D(N >> (s + 1)), .LOG2N(LOG2N), .LAG(stage_lag(s))
    ) u_stage (
      .clk, .rst_n, .en, .pos,
      .in_valid(v[s]), .in_re(re[s]), .in_im(im[s]),
      .out_valid(v[s+1]), .out_re(re[s+1]), .out_im(im[s+1])
    );
  end

  logic signed [W-1:0] o_re, o_im;

  fft_reorder #(.W(W), .LOG2N(LOG2N), .LAG(TOTAL_LAG)) u_reorder (
    .clk, .rst_n, .en, .pos,
    .in_valid(v[LOG2N]), .in_re(re[LOG2N]), .in_im(im[LOG2N]),
    .source_valid, .source_sop, .source_eop,
    .source_re(o_re), .source_im(o_im)
  );

  assign source_re = INVERSE ? o_im : o_re;
  assign source_im = INVERSE ? o_re : o_im;

endmodule
