// One of the two parallel multipliers (Mult1, Mult2) of the CWT processor.
//
// Multiplies a signed 20-bit FFT sample (real part in Mult1, imaginary part
// in Mult2) by an unsigned 8-bit Morlet sample and registers the signed
// 28-bit product: latency one cycle, one product per cycle while ce is high;
// with ce low the output holds. Because the Morlet wavelet is real in the
// frequency domain, the two multipliers together form the complex product
// X(w) * Psi(w). The widths, the one-cycle latency and the clock enable
// follow the document; the product is exact (signed 20 x unsigned 8 bits fits
// in 28 bits), and out_valid marks a product computed from valid inputs.
module cwt_mult #(
  parameter int AW_ = 20,  // signal sample width
  parameter int BW_ = 8    // wavelet sample width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic                    in_valid,
  input  logic signed [AW_-1:0]   a,
  input  logic        [BW_-1:0]   b,
  output logic                    out_valid,
  output logic signed [AW_+BW_-1:0] p
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else if (ce) begin
      out_valid <= in_valid;
      p         <= (AW_+BW_)'(a) * $signed({1'b0, b});
    end
  end
endmodule
