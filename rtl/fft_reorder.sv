// Bit-reversal reorder buffer at the output of the SDF pipeline FFT.
//
// The pipeline delivers the bins of a frame in bit-reversed order. This
// buffer writes each arriving sample at address bitrev(m), where m is its
// place in the frame, into one of two N-word banks. When a bank is full it is
// read out in natural order, one bin per cycle for N cycles, while the other
// bank fills. A frame therefore leaves the buffer with source_sop on bin 0
// and source_eop on bin N-1, starting two cycles after its last sample
// arrives; frames that arrive back to back leave back to back. The writer's
// frame place comes from the shared pipeline position pos minus the pipeline
// lag LAG. Two banks are enough because arrivals are
// at most one per cycle. The double-buffered reorder is a choice of this
// design; the document's FFT outputs bins in natural order.
module fft_reorder #(
  parameter int W     = 20,
  parameter int LOG2N = 12,
  parameter int LAG   = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [LOG2N-1:0]    pos,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                source_valid,
  output logic                source_sop,
  output logic                source_eop,
  output logic signed [W-1:0] source_re,
  output logic signed [W-1:0] source_im
);
  localparam int N = 1 << LOG2N;

  // Both banks in one memory: word {bank, address}.
  logic signed [W-1:0] bank_re [2*N];
  logic signed [W-1:0] bank_im [2*N];

  logic [LOG2N-1:0] m, m_rev;
  assign m = pos - LOG2N'(LAG);
  always_comb
    for (int b = 0; b < LOG2N; b++) m_rev[b] = m[LOG2N-1-b];

  logic       wbank, rbank, reading;
  logic [1:0] full;
  logic [LOG2N-1:0] raddr;

  logic wr_last;
  assign wr_last = en && in_valid && (m == LOG2N'(N - 1));

  logic rd_last;
  assign rd_last = reading && (raddr == LOG2N'(N - 1));

  // Bank fill flags: set when the writer completes a bank, cleared when the
  // reader leaves it.
  logic [1:0] full_nxt;
  always_comb begin
    full_nxt = full;
    if (wr_last) full_nxt[wbank] = 1'b1;
    if (rd_last) full_nxt[rbank] = 1'b0;
  end

  // Memory ports, without reset so they map onto RAM blocks.
  always_ff @(posedge clk) begin
    if (en && in_valid) begin
      bank_re[{wbank, m_rev}] <= in_re;
      bank_im[{wbank, m_rev}] <= in_im;
    end
    if (reading) begin
      source_re <= bank_re[{rbank, raddr}];
      source_im <= bank_im[{rbank, raddr}];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank        <= 1'b0;
      rbank        <= 1'b0;
      full         <= '0;
      reading      <= 1'b0;
      raddr        <= '0;
      source_valid <= 1'b0;
      source_sop   <= 1'b0;
      source_eop   <= 1'b0;
    end else begin
      full <= full_nxt;
      if (wr_last) wbank <= ~wbank;
      source_valid <= reading;
      source_sop   <= reading && (raddr == '0);
      source_eop   <= rd_last;
      if (reading) begin
        raddr <= raddr + 1'b1;
        if (rd_last) begin
          // Go straight on to the other bank if it is already full, so
          // back-to-back frames leave without a gap and never overtake.
          reading <= full_nxt[~rbank];
          rbank   <= ~rbank;
        end
      end else if (full[rbank]) begin
        reading <= 1'b1;
        raddr   <= '0;
      end
    end
  end

endmodule
