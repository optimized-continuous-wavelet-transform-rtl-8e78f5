// Control module of the CWT processor: the one place that sequences the FFT,
// the capture memories, the two multipliers, RAM3/RAM4 and the IFFT.
//
// A run, started by a one-cycle start pulse in ST_IDLE:
//  1. ST_LOAD: x_ready is high for N cycles; each input sample goes straight
//     into the FFT sink with sink_sop on the first and sink_eop on the last.
//     The first FFT sample also starts the cycle counter.
//  2. ST_MULT: the FFT bins leave in natural order; bins 40..709 are written
//     to RAM1/RAM2 at address bin-40. One cycle after bin 204 (the first bin
//     of scale 26) is written, the multiplication pass starts: 6144 reads, one
//     per cycle, of the captured bin of scale j and of RAM4 word i; the
//     operands are registered one cycle in the datapath, the multipliers add
//     one more, and Mult1/Mult2 write word i of RAM4/RAM3 three cycles after
//     it was read. The capture stays ahead of the reads: scale 26 reads bin b
//     one cycle after it is written, later scales start at lower bins.
//  3. ST_FEED: once the last product is written, 25 frames of N samples leave
//     back to back for the IFFT. Sample k of frame j is RAM4/RAM3 word
//     SCALE_OFF[j] + k - SCALE_START[j] if the bin is one kept for scale j, and
//     zero otherwise (the leading and trailing zeros). RAM reads are issued
//     one cycle ahead of the IFFT sink.
//  4. ST_OUT: the IFFT output is tagged with its scale (0..24 = scale 26..50)
//     and time index; after the last coefficient done pulses for one cycle
//     and cycle_count holds the number of cycles from the first FFT sample to
//     the last coefficient.
// Between runs RAM4 can be reloaded through the wav_* port (ST_IDLE only).
//
// The order of operations, the overlap of capture and multiplication, the
// three-cycle read/write distance in RAM4, the zero insertion and the cycle
// counter follow the document. The handshake (start, x_ready, done) and the
// start of the IFFT only after the whole multiplication pass (the document's
// timeline) are how this design realises it; the FFT/IFFT reset signals of
// the document are replaced by the global reset.
module cwt_control
  import cwt_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // run control
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic [31:0]         cycle_count,
  // I(t) interface
  input  logic                x_valid,
  output logic                x_ready,
  // FFT
  input  logic                fft_ready,
  output logic                fft_sink_valid,
  output logic                fft_sink_sop,
  output logic                fft_sink_eop,
  input  logic                fft_src_valid,
  input  logic                fft_src_sop,
  // RAM1 / RAM2 (captured bins)
  output logic                ram12_we,
  output logic [BIN_AW-1:0]   ram12_waddr,
  output logic                ram12_re,
  output logic [BIN_AW-1:0]   ram12_raddr,
  // multipliers
  output logic                mult_ce,
  output logic                mult_in_valid,
  input  logic                mult_out_valid,
  // RAM4 (wavelet / real products)
  output logic                ram4_re,
  output logic [PROD_AW-1:0]  ram4_raddr,
  output logic                ram4_we,
  output logic [PROD_AW-1:0]  ram4_waddr,
  output logic                ram4_wsel_load,   // 1: write the reload data, 0: write Mult1
  input  logic                wav_we,
  input  logic [PROD_AW-1:0]  wav_addr,
  // RAM3 (imaginary products)
  output logic                ram3_re,
  output logic [PROD_AW-1:0]  ram3_raddr,
  output logic                ram3_we,
  output logic [PROD_AW-1:0]  ram3_waddr,
  // IFFT
  input  logic                ifft_ready,
  output logic                ifft_sink_valid,
  output logic                ifft_sink_sop,
  output logic                ifft_sink_eop,
  output logic                ifft_zero,        // 1: feed zero instead of RAM data
  input  logic                ifft_src_valid,
  // CWT coefficient tags
  output logic                cwt_valid,
  output logic [SCALE_W-1:0]  cwt_scale,
  output logic [LOG2N-1:0]    cwt_time
);

  ctrl_state_t state;

  // ---------------------------------------------------------------- input
  logic [LOG2N-1:0] in_cnt;
  logic             load_started;

  assign x_ready        = (state == ST_LOAD) && (load_started || fft_ready);
  assign fft_sink_valid = x_ready && x_valid;
  assign fft_sink_sop   = fft_sink_valid && (in_cnt == '0);
  assign fft_sink_eop   = fft_sink_valid && (in_cnt == LOG2N'(N - 1));

  // -------------------------------------------------------------- capture
  logic [LOG2N-1:0] cap_cnt;   // bin number of the current FFT output
  logic [LOG2N-1:0] cap_bin;
  logic [BIN_AW:0]  cap_written; // bins written to RAM1/RAM2 in this run
  assign cap_bin     = (fft_src_valid && fft_src_sop) ? '0 : cap_cnt;
  assign ram12_we    = fft_src_valid && (state == ST_MULT) &&
                       (int'(cap_bin) >= BIN_LO) && (int'(cap_bin) <= BIN_HI);
  assign ram12_waddr = BIN_AW'(int'(cap_bin) - BIN_LO);

  // ------------------------------------------------------- multiplication
  logic                 mul_run, mul_armed;
  logic [SCALE_W-1:0]   mj;            // scale being multiplied
  logic [BIN_AW-1:0]    ml;            // place inside the scale
  logic [PROD_AW-1:0]   mi;            // RAM4 word being read
  logic [PROD_AW-1:0]   mi_d1, mi_d2, mi_d3;
  logic                 mv_d1, mv_d2;

  assign ram12_re    = mul_run;
  assign ram12_raddr = BIN_AW'(SCALE_START[mj] + int'(ml) - BIN_LO);

  // Pipeline: read (t) -> RAM data (t+1) -> operand registers (t+2) -> product (t+3).
  assign mult_ce       = mv_d1 || mv_d2 || mult_out_valid;
  assign mult_in_valid = mv_d2;
  assign ram3_we       = mult_out_valid;
  assign ram3_waddr    = mi_d3;

  // ------------------------------------------------------------ IFFT feed
  logic                 feed_run;
  logic [SCALE_W-1:0]   fj;
  logic [LOG2N-1:0]     fk;
  logic                 f_in;          // bin fk is kept for scale fj
  logic                 fv_q, fsop_q, feop_q, fin_q;

  assign f_in = (int'(fk) >= SCALE_START[fj]) && (int'(fk) < SCALE_START[fj] + SCALE_LEN[fj]);

  assign ram3_re    = feed_run && f_in;
  assign ram3_raddr = PROD_AW'(SCALE_OFF[fj] + int'(fk) - SCALE_START[fj]);

  // RAM4 is read by the multiplication pass, then by the IFFT feed.
  assign ram4_re    = mul_run || (feed_run && f_in);
  assign ram4_raddr = mul_run ? mi : ram3_raddr;
  assign ram4_we    = mult_out_valid || (state == ST_IDLE && wav_we);
  assign ram4_waddr = mult_out_valid ? mi_d3 : wav_addr;
  assign ram4_wsel_load = !mult_out_valid;

  assign ifft_sink_valid = fv_q;
  assign ifft_sink_sop   = fsop_q;
  assign ifft_sink_eop   = feop_q;
  assign ifft_zero       = !fin_q;

  // ---------------------------------------------------------- IFFT output
  logic [SCALE_W-1:0] oj;
  logic [LOG2N-1:0]   ot;
  assign cwt_valid = ifft_src_valid && (state == ST_OUT || state == ST_FEED);
  assign cwt_scale = oj;
  assign cwt_time  = ot;

  logic last_out;
  assign last_out = cwt_valid && (int'(oj) == NSCALE - 1) && (ot == LOG2N'(N - 1));

  // -------------------------------------------------------- cycle counter
  logic counting;

  assign busy = (state != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_IDLE;
      in_cnt       <= '0;
      load_started <= 1'b0;
      cap_cnt      <= '0;
      cap_written  <= '0;
      mul_run      <= 1'b0;
      mul_armed    <= 1'b0;
      mj           <= '0;
      ml           <= '0;
      mi           <= '0;
      mi_d1        <= '0;
      mi_d2        <= '0;
      mi_d3        <= '0;
      mv_d1        <= 1'b0;
      mv_d2        <= 1'b0;
      feed_run     <= 1'b0;
      fj           <= '0;
      fk           <= '0;
      fv_q         <= 1'b0;
      fsop_q       <= 1'b0;
      feop_q       <= 1'b0;
      fin_q        <= 1'b0;
      oj           <= '0;
      ot           <= '0;
      counting     <= 1'b0;
      cycle_count  <= '0;
      done         <= 1'b0;
    end else begin
      done <= 1'b0;

      // cycle counter: first FFT sample up to the last coefficient
      if (fft_sink_sop) begin
        counting    <= 1'b1;
        cycle_count <= 32'd1;
      end else if (counting) begin
        cycle_count <= cycle_count + 1'b1;
        if (last_out) counting <= 1'b0;
      end

      // FFT output bin counter
      if (fft_src_valid) cap_cnt <= cap_bin + 1'b1;
      if (ram12_we) cap_written <= cap_written + 1'b1;

      // multiplication pipeline tags
      mv_d1 <= mul_run;
      mv_d2 <= mv_d1;
      mi_d1 <= mi;
      mi_d2 <= mi_d1;
      mi_d3 <= mi_d2;

      // IFFT feed pipeline: RAM read issued now, sink sample next cycle
      fv_q   <= feed_run;
      fsop_q <= feed_run && (fk == '0);
      feop_q <= feed_run && (fk == LOG2N'(N - 1));
      fin_q  <= feed_run && f_in;

      if (cwt_valid) begin
        if (ot == LOG2N'(N - 1)) begin
          ot <= '0;
          oj <= oj + 1'b1;
        end else begin
          ot <= ot + 1'b1;
        end
      end

      unique case (state)
        ST_IDLE: begin
          if (start) begin
            state        <= ST_LOAD;
            in_cnt       <= '0;
            load_started <= 1'b0;
            cap_written  <= '0;
          end
        end

        ST_LOAD: begin
          if (fft_sink_valid) begin
            load_started <= 1'b1;
            in_cnt       <= in_cnt + 1'b1;
            if (fft_sink_eop) begin
              state     <= ST_MULT;
              mul_armed <= 1'b1;
              mj        <= '0;
              ml        <= '0;
              mi        <= '0;
            end
          end
        end

        ST_MULT: begin
          // start one cycle after bin 204 has been written to RAM1/RAM2
          if (mul_armed && ram12_we && int'(cap_bin) == MULT_START_BIN) begin
            mul_armed <= 1'b0;
            mul_run   <= 1'b1;
          end
          if (mul_run) begin
            mi <= mi + 1'b1;
            if (int'(ml) == SCALE_LEN[mj] - 1) begin
              ml <= '0;
              mj <= mj + 1'b1;
            end else begin
              ml <= ml + 1'b1;
            end
            if (int'(mi) == PROD_DEPTH - 1) mul_run <= 1'b0;
          end
          // the last product is written three cycles after the last read
          if (mult_out_valid && int'(mi_d3) == PROD_DEPTH - 1) begin
            state <= ST_FEED;
            fj    <= '0;
            fk    <= '0;
          end
        end

        ST_FEED: begin
          if (!feed_run && fj == '0 && fk == '0 && ifft_ready) begin
            feed_run <= 1'b1;
            oj       <= '0;
            ot       <= '0;
          end
          if (feed_run) begin
            fk <= fk + 1'b1;
            if (fk == LOG2N'(N - 1)) begin
              if (int'(fj) == NSCALE - 1) begin
                feed_run <= 1'b0;
                state    <= ST_OUT;
              end else begin
                fj <= fj + 1'b1;
              end
            end
          end
        end

        ST_OUT: begin
          if (last_out) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end
        end

        default: state <= ST_IDLE;
      endcase
    end
  end

  // --------------------------------------------------------------- checks
  // The source presents one sample per cycle while x_ready is high.
  a_stream: assert property (@(posedge clk) disable iff (!rst_n) x_ready |-> x_valid);
  // RAM4 is never written at the address being read in the same pass sooner
  // than three cycles later.
  a_rw_gap: assert property (@(posedge clk) disable iff (!rst_n)
    mul_run && mult_out_valid |-> (mi - mi_d3) >= PROD_AW'(3));
  // A captured bin is read only after it has been written.
  a_capture_first: assert property (@(posedge clk) disable iff (!rst_n)
    mul_run |-> int'(ram12_raddr) < int'(cap_written));
endmodule
