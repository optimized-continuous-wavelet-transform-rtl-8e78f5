// RAM4: the wavelet memory that also receives the real products.
//
// At start-up the 6144 words hold the non-zero frequency-domain Morlet
// samples of scales 26..50, packed scale after scale (scale j at word
// cwt_pkg::scale_offset(j), its bins from SCALE_START[j] upwards), each an
// unsigned 8-bit value in the low bits of a 28-bit word. During the
// multiplication pass the controller reads word i, and three cycles later
// writes the product of that wavelet sample back to word i, so the memory
// needs no separate wavelet ROM: every word is read once before it is
// overwritten. After the pass the words hold the 28-bit real products that
// the IFFT reads.
//
// Ports: one synchronous read port (data one cycle after re) and one write
// port; a read of the address written in the same cycle returns the old word.
// The initial contents are computed from cwt_pkg::morlet_sample. Because a
// run overwrites them, the write port can also reload wavelet samples
// between runs. Sharing the memory between wavelets and products and the
// 3-cycle read/write separation follow the document; the packing and the
// reload through the write port are this design's choices.
module wavelet_ram
  import cwt_pkg::*;
#(
  parameter int DEPTH = PROD_DEPTH,
  parameter int WIDTH = PW,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    for (int j = 0; j < NSCALE; j++)
      for (int l = 0; l < SCALE_LEN[j]; l++)
        if (scale_offset(j) + l < DEPTH)
          mem[scale_offset(j) + l] = WIDTH'(morlet_sample(j, SCALE_START[j] + l));
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

  a_waddr: assert property (@(posedge clk) we |-> int'(waddr) < DEPTH);
  a_raddr: assert property (@(posedge clk) re |-> int'(raddr) < DEPTH);
endmodule
