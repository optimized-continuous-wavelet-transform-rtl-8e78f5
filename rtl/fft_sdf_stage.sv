// One radix-2 decimation-in-frequency stage of a single-path delay-feedback
// (SDF) pipeline FFT.
//
// The stage works on blocks of 2*D consecutive samples. During the first D
// samples of a block it stores the incoming samples in a D-word delay memory
// and sends out what that memory held (the twiddled differences of the
// previous block). During the second D samples it combines each stored sample
// a with the incoming one b: it sends out (a+b)/2 at once and stores
// (a-b)/2 * exp(-j*pi*n/D) for output during the next block. Every stage
// halves its results, so a chain of log2(N) stages computes DFT/N and never
// overflows; the twiddled difference is saturated to the word width.
//
// The whole FFT pipeline moves in lockstep: en advances every stage at once,
// pos is the shared sample position (mod N) of the FFT input, and LAG is the
// number of en cycles between the FFT input and this stage's input, so the
// stage finds its place inside the 2*D block as pos - LAG. A valid flag
// travels with each sample. Output is registered: one cycle plus D samples of
// delay. Twiddles are 16-bit (1.0 = 2^14), computed at elaboration. The SDF
// structure, the halving per stage and the twiddle width are choices of this
// design; the document only uses an FFT of this length and word width.
module fft_sdf_stage #(
  parameter int W     = 20,   // real and imaginary width
  parameter int D     = 2048, // delay length, N / 2^(stage+1)
  parameter int LOG2N = 12,
  parameter int LAG   = 0     // en cycles from FFT input to this stage's input
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [LOG2N-1:0]    pos,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int TW = 16;
  localparam int TF = 14;             // twiddle fraction bits
  localparam int DA = (D > 1) ? $clog2(D) : 1;
  localparam int CW = $clog2(2 * D);  // bits of the place in the 2D block

  typedef logic signed [TW-1:0] tw_t;

  function automatic tw_t tw_cos(int n);
    return tw_t'($rtoi($floor($cos(3.14159265358979 * real'(n) / real'(D)) * real'(1 << TF) + 0.5)));
  endfunction
  function automatic tw_t tw_sin(int n);
    // Forward transform: exp(-j*theta) has imaginary part -sin(theta).
    return tw_t'($rtoi($floor(-$sin(3.14159265358979 * real'(n) / real'(D)) * real'(1 << TF) + 0.5)));
  endfunction

  tw_t cos_rom [D];
  tw_t sin_rom [D];
  initial begin
    for (int n = 0; n < D; n++) begin
      cos_rom[n] = tw_cos(n);
      sin_rom[n] = tw_sin(n);
    end
  end

  logic signed [W-1:0] mem_re [D];
  logic signed [W-1:0] mem_im [D];
  logic [D-1:0]        mem_v;

  logic [LOG2N-1:0] lpos;
  logic [CW-1:0]    place;
  logic             phase;
  logic [DA-1:0]    idx;

  assign lpos  = pos - LOG2N'(LAG);
  assign place = lpos[CW-1:0];
  assign phase = place[CW-1];
  if (D > 1) begin : g_idx
    assign idx = place[DA-1:0];
  end else begin : g_idx1
    assign idx = '0;
  end

  logic signed [W-1:0] a_re, a_im;
  logic                a_v;
  assign a_re = mem_re[idx];
  assign a_im = mem_im[idx];
  assign a_v  = mem_v[idx];

  // Butterfly with halving and round-half-up.
  logic signed [W:0] sum_re, sum_im, dif_re, dif_im;
  assign sum_re = (W+1)'(a_re) + (W+1)'(in_re) + (W+1)'(1);
  assign sum_im = (W+1)'(a_im) + (W+1)'(in_im) + (W+1)'(1);
  assign dif_re = (W+1)'(a_re) - (W+1)'(in_re) + (W+1)'(1);
  assign dif_im = (W+1)'(a_im) - (W+1)'(in_im) + (W+1)'(1);

  logic signed [W-1:0] h_re, h_im;   // (a-b)/2
  assign h_re = dif_re[W:1];
  assign h_im = dif_im[W:1];

  // Twiddle product, rounded and saturated back to W bits.
  localparam int MW = W + TW + 1;
  logic signed [MW-1:0] p_re, p_im;
  logic signed [MW-TF-1:0] q_re, q_im;
  tw_t wr, wi;
  assign wr = cos_rom[idx];
  assign wi = sin_rom[idx];
  assign p_re = MW'(h_re) * MW'(wr) - MW'(h_im) * MW'(wi) + MW'(1 << (TF - 1));
  assign p_im = MW'(h_re) * MW'(wi) + MW'(h_im) * MW'(wr) + MW'(1 << (TF - 1));
  assign q_re = p_re[MW-1:TF];
  assign q_im = p_im[MW-1:TF];

  function automatic logic signed [W-1:0] sat(logic signed [MW-TF-1:0] x);
    localparam logic signed [MW-TF-1:0] MAXV = (MW-TF)'((1 << (W - 1)) - 1);
    localparam logic signed [MW-TF-1:0] MINV = -(MW-TF)'(1 << (W - 1));
    if (x > MAXV) return MAXV[W-1:0];
    if (x < MINV) return MINV[W-1:0];
    return x[W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (en) begin
      if (!phase) begin
        mem_re[idx] <= in_re;
        mem_im[idx] <= in_im;
      end else begin
        mem_re[idx] <= sat(q_re);
        mem_im[idx] <= sat(q_im);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_v     <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else if (en) begin
      mem_v[idx] <= in_valid;
      if (!phase) begin
        out_valid <= a_v;
        out_re    <= a_re;
        out_im    <= a_im;
      end else begin
        out_valid <= in_valid;
        out_re    <= sum_re[W:1];
        out_im    <= sum_im[W:1];
      end
    end
  end

endmodule
