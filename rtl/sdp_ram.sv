// Simple dual-port RAM: one write port and one read port, one clock.
//
// Used for RAM1 and RAM2 (670 x 20 bits: real and imaginary FFT bins 40..709)
// and for RAM3 (6144 x 28 bits: the imaginary products of Mult2). A write
// takes effect at the clock edge; a read returns mem[raddr] one cycle after
// re is high and holds it otherwise. Reading an address in the cycle it is
// written returns the old word. The sizes are the document's; the port
// arrangement and the read timing are this design's choice. The contents
// start undefined and need no reset: the controller writes every word before
// it reads it.
module sdp_ram #(
  parameter int DEPTH = 670,
  parameter int WIDTH = 20,
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

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

  a_waddr: assert property (@(posedge clk) we |-> int'(waddr) < DEPTH);
  a_raddr: assert property (@(posedge clk) re |-> int'(raddr) < DEPTH);
endmodule
