// Optimized FFT-based continuous wavelet transform (CWT) processor.
//
// Computes the CWT of a 4096-sample real signal I(t) (the in-phase part of a
// radar Doppler signal) at the 25 Morlet scales 26..50, the band of roughly
// 4..20 Hz where body-movement artifacts show up. The transform is done in
// the frequency domain: FFT of the signal, point-by-point product with the
// stored frequency-domain wavelet of each scale, one IFFT per scale. Only the
// non-zero part of each scale's wavelet is stored and multiplied (6144 words
// for all 25 scales), so only FFT bins 40..709 are kept (RAM1 real, RAM2
// imaginary, 670 words each). Two multipliers work in parallel on the real
// and the imaginary part. RAM4 starts out holding the wavelet samples and
// receives the real products in place; RAM3 receives the imaginary products.
// The controller feeds each scale's products to the IFFT with zeros around
// them, and the IFFT streams out 25 x 4096 complex coefficients.
//
// Interface: pulse start in idle, then present one sample per cycle on x_data
// while x_ready is high (4096 cycles). Coefficients leave on cwt_* with their
// scale (0..24 for scales 26..50) and time index, scale after scale in time
// order; done pulses after the last one and cycle_count then holds the
// cycles from the first FFT sample to the last coefficient (125,164 at the
// default size). Between runs RAM4 must be given the wavelet samples again
// (wav_we/wav_addr/wav_data, in idle only), since a run overwrites them; at
// power-up they are already there.
//
// The block structure, sizes and data flow follow the document's optimized
// architecture; the FFT/IFFT insides, the scaling (forward FFT returns
// DFT/N, IFFT the exact inverse) and the handshakes are this design's own.
module cwt_processor
  import cwt_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic [31:0]         cycle_count,
  // I(t) input interface
  input  logic                x_valid,
  output logic                x_ready,
  input  logic signed [DW-1:0] x_data,
  // wavelet reload port (RAM4), idle only
  input  logic                wav_we,
  input  logic [PROD_AW-1:0]  wav_addr,
  input  logic [WW-1:0]       wav_data,
  // CWT coefficients
  output logic                cwt_valid,
  output logic [SCALE_W-1:0]  cwt_scale,
  output logic [LOG2N-1:0]    cwt_time,
  output logic signed [PW-1:0] cwt_re,
  output logic signed [PW-1:0] cwt_im
);

  // control <-> datapath
  logic fft_ready, fft_sink_valid, fft_sink_sop, fft_sink_eop;
  logic fft_src_valid, fft_src_sop, fft_src_eop;
  logic signed [DW-1:0] fft_src_re, fft_src_im;
  logic ram12_we, ram12_re;
  logic [BIN_AW-1:0] ram12_waddr, ram12_raddr;
  logic mult_ce, mult_in_valid, mult1_out_valid, mult2_out_valid;
  logic ram4_re, ram4_we, ram4_wsel_load;
  logic [PROD_AW-1:0] ram4_raddr, ram4_waddr;
  logic ram3_re, ram3_we;
  logic [PROD_AW-1:0] ram3_raddr, ram3_waddr;
  logic ifft_ready, ifft_sink_valid, ifft_sink_sop, ifft_sink_eop, ifft_zero;
  logic ifft_src_valid, ifft_src_sop, ifft_src_eop;

  cwt_control u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .cycle_count,
    .x_valid, .x_ready,
    .fft_ready, .fft_sink_valid, .fft_sink_sop, .fft_sink_eop,
    .fft_src_valid, .fft_src_sop,
    .ram12_we, .ram12_waddr, .ram12_re, .ram12_raddr,
    .mult_ce, .mult_in_valid, .mult_out_valid(mult1_out_valid),
    .ram4_re, .ram4_raddr, .ram4_we, .ram4_waddr, .ram4_wsel_load,
    .wav_we, .wav_addr,
    .ram3_re, .ram3_raddr, .ram3_we, .ram3_waddr,
    .ifft_ready, .ifft_sink_valid, .ifft_sink_sop, .ifft_sink_eop, .ifft_zero,
    .ifft_src_valid,
    .cwt_valid, .cwt_scale, .cwt_time
  );

  // N-point FFT of the real input
  fft_stream #(.W(DW), .LOG2N(LOG2N), .INVERSE(1'b0)) u_fft (
    .clk, .rst_n,
    .sink_ready(fft_ready), .sink_valid(fft_sink_valid),
    .sink_sop(fft_sink_sop), .sink_eop(fft_sink_eop),
    .sink_re(x_data), .sink_im('0),
    .source_valid(fft_src_valid), .source_sop(fft_src_sop), .source_eop(fft_src_eop),
    .source_re(fft_src_re), .source_im(fft_src_im)
  );

  // RAM1 / RAM2: FFT bins 40..709
  logic [DW-1:0] ram1_q, ram2_q;
  sdp_ram #(.DEPTH(BIN_DEPTH), .WIDTH(DW)) u_ram1 (
    .clk, .we(ram12_we), .waddr(ram12_waddr), .wdata(fft_src_re),
    .re(ram12_re), .raddr(ram12_raddr), .rdata(ram1_q));
  sdp_ram #(.DEPTH(BIN_DEPTH), .WIDTH(DW)) u_ram2 (
    .clk, .we(ram12_we), .waddr(ram12_waddr), .wdata(fft_src_im),
    .re(ram12_re), .raddr(ram12_raddr), .rdata(ram2_q));

  // RAM4: wavelet samples, then real products
  logic [PW-1:0] ram4_q, ram4_wdata;
  logic signed [PW-1:0] mult1_p, mult2_p;
  assign ram4_wdata = ram4_wsel_load ? PW'(wav_data) : mult1_p;
  wavelet_ram u_ram4 (
    .clk, .we(ram4_we), .waddr(ram4_waddr), .wdata(ram4_wdata),
    .re(ram4_re), .raddr(ram4_raddr), .rdata(ram4_q));

  // operand registers: keep the RAM4 read three cycles ahead of its write
  logic signed [DW-1:0] op_re, op_im;
  logic [WW-1:0]        op_w;
  always_ff @(posedge clk) begin
    op_re <= ram1_q;
    op_im <= ram2_q;
    op_w  <= ram4_q[WW-1:0];
  end

  cwt_mult #(.AW_(DW), .BW_(WW)) u_mult1 (
    .clk, .rst_n, .ce(mult_ce), .in_valid(mult_in_valid),
    .a(op_re), .b(op_w), .out_valid(mult1_out_valid), .p(mult1_p));
  cwt_mult #(.AW_(DW), .BW_(WW)) u_mult2 (
    .clk, .rst_n, .ce(mult_ce), .in_valid(mult_in_valid),
    .a(op_im), .b(op_w), .out_valid(mult2_out_valid), .p(mult2_p));

  // RAM3: imaginary products
  logic [PW-1:0] ram3_q;
  sdp_ram #(.DEPTH(PROD_DEPTH), .WIDTH(PW)) u_ram3 (
    .clk, .we(ram3_we), .waddr(ram3_waddr), .wdata(mult2_p),
    .re(ram3_re), .raddr(ram3_raddr), .rdata(ram3_q));

  // N-point IFFT of each zero-padded product spectrum
  logic signed [PW-1:0] ifft_in_re, ifft_in_im;
  assign ifft_in_re = ifft_zero ? '0 : ram4_q;
  assign ifft_in_im = ifft_zero ? '0 : ram3_q;

  fft_stream #(.W(PW), .LOG2N(LOG2N), .INVERSE(1'b1)) u_ifft (
    .clk, .rst_n,
    .sink_ready(ifft_ready), .sink_valid(ifft_sink_valid),
    .sink_sop(ifft_sink_sop), .sink_eop(ifft_sink_eop),
    .sink_re(ifft_in_re), .sink_im(ifft_in_im),
    .source_valid(ifft_src_valid), .source_sop(ifft_src_sop), .source_eop(ifft_src_eop),
    .source_re(cwt_re), .source_im(cwt_im)
  );

  // The two multipliers share one enable and one operand pipeline.
  a_mult_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    mult1_out_valid == mult2_out_valid);
  // Each coefficient frame starts with the IFFT's start-of-packet.
  a_out_frame: assert property (@(posedge clk) disable iff (!rst_n)
    cwt_valid |-> (ifft_src_sop == (cwt_time == '0)) && (ifft_src_eop == (cwt_time == LOG2N'(N - 1))));
endmodule
