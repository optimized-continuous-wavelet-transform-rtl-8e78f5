// Self-checking testbench of RAM4, the wavelet/product memory: reads every
// word after power-up and compares it with the Morlet sample
// 2 exp(-(s w - 6)^2 / 2) computed here, peaking in the middle of each
// scale's bin range (unsigned, 7 fraction bits), checks that every stored
// sample is non-zero, then checks the in-place pattern of the
// multiplication pass: read word i, write word i - 3 in the same cycle, and
// read everything back.
module tb_wavelet_ram;
  import cwt_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we, re;
  logic [12:0] waddr, raddr;
  logic [27:0] wdata, rdata;

  wavelet_ram dut (.*);

  int checks = 0, failures = 0;
  logic [27:0] model [PROD_DEPTH];
  logic [27:0] orig [PROD_DEPTH];

  // Morlet band-pass peaking at bin c: 2 exp(-(6 k / c - 6)^2 / 2), x128.
  function automatic int ref_sample(real c, int k);
    real u, v;
    u = 6.0 * real'(k) / c - 6.0;
    v = 256.0 * $exp(-u * u / 2.0);
    if (v > 255.0) v = 255.0;
    return int'($floor(v + 0.5));
  endfunction

  initial begin
    int off, nz;
    int en [25] = '{709, 662, 617, 576, 538, 502, 468, 437, 408, 380, 355, 331, 309,
                    288, 269, 251, 234, 219, 204, 190, 178, 166, 155, 144, 135};
    int st [25] = '{204, 191, 178, 166, 155, 145, 135, 126, 118, 110, 103, 96, 90,
                    84, 78, 73, 68, 64, 60, 56, 52, 49, 46, 43, 40};
    int ln [25] = '{506, 472, 440, 411, 384, 358, 334, 312, 291, 271, 253, 236, 220,
                    205, 192, 179, 167, 156, 145, 135, 127, 118, 110, 102, 20};
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    off = 0; nz = 0;
    for (int j = 0; j < 25; j++)
      for (int l = 0; l < ln[j]; l++) begin
        model[off] = 28'(ref_sample(real'(st[j] + en[j]) / 2.0, st[j] + l));
        checks++;
        if (model[off] == 0) failures++;   // every stored sample is non-zero
        off++;
      end
    checks++;
    if (off != PROD_DEPTH) failures++;
    // power-up contents
    for (int i = 0; i < PROD_DEPTH; i++) begin
      @(negedge clk);
      re = 1'b1; raddr = 13'(i);
      @(negedge clk);
      re = 1'b0;
      checks++;
      if (rdata != model[i]) begin
        failures++;
        if (failures < 10) $display("word %0d: %0d expected %0d", i, rdata, model[i]);
      end
      if (rdata != 0) nz++;
    end
    checks++;
    if (nz < PROD_DEPTH / 2) failures++;
    // in-place pass: read i, write i-3 with a product-like value
    for (int i = 0; i < PROD_DEPTH; i++) orig[i] = model[i];
    for (int i = 0; i < PROD_DEPTH + 3; i++) begin
      @(negedge clk);
      re = (i < PROD_DEPTH); raddr = 13'(i % PROD_DEPTH);
      we = (i >= 3); waddr = 13'(i - 3);
      wdata = 28'(model[(i + PROD_DEPTH - 3) % PROD_DEPTH] * 28'd1000 + 28'(i));
      if (i >= 3) model[i - 3] = wdata;
      @(posedge clk); #1;
      if (i < PROD_DEPTH) begin
        checks++;
        if (rdata != orig[i]) begin
          failures++;
          if (failures < 10) $display("pass read word %0d: %0d expected %0d", i, rdata, orig[i]);
        end
      end
    end
    @(negedge clk); we = 0; re = 0;
    for (int i = 0; i < PROD_DEPTH; i++) begin
      @(negedge clk);
      re = 1'b1; raddr = 13'(i);
      @(negedge clk);
      re = 1'b0;
      checks++;
      if (rdata != model[i]) begin
        failures++;
        if (failures < 10) $display("after pass word %0d: %0d expected %0d", i, rdata, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    $display("tb_wavelet_ram: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
