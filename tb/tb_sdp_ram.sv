// Self-checking testbench of the simple dual-port RAM at the RAM1/RAM2 size
// (670 x 20) and the RAM3 size (6144 x 28): random writes and reads against a
// model array, read data one cycle after re, hold while re is low, and a read
// of the address written in the same cycle returning the old word.
module tb_sdp_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        we_a, re_a;
  logic [9:0]  wa_a, ra_a;
  logic [19:0] wd_a, rd_a;
  logic        we_b, re_b;
  logic [12:0] wa_b, ra_b;
  logic [27:0] wd_b, rd_b;

  sdp_ram #(.DEPTH(670),  .WIDTH(20)) dut_a (.clk, .we(we_a), .waddr(wa_a), .wdata(wd_a), .re(re_a), .raddr(ra_a), .rdata(rd_a));
  sdp_ram #(.DEPTH(6144), .WIDTH(28)) dut_b (.clk, .we(we_b), .waddr(wa_b), .wdata(wd_b), .re(re_b), .raddr(ra_b), .rdata(rd_b));

  logic [19:0] model_a [670];
  logic [27:0] model_b [6144];

  task automatic check_a(logic [19:0] exp, string what);
    checks++;
    if (rd_a !== exp) begin
      failures++;
      if (failures < 10) $display("ram 670x20 %s: got %h expected %h", what, rd_a, exp);
    end
  endtask
  task automatic check_b(logic [27:0] exp, string what);
    checks++;
    if (rd_b !== exp) begin
      failures++;
      if (failures < 10) $display("ram 6144x28 %s: got %h expected %h", what, rd_b, exp);
    end
  endtask

  initial begin
    logic [19:0] ea; logic [27:0] eb;
    we_a = 0; re_a = 0; wa_a = '0; ra_a = '0; wd_a = '0;
    we_b = 0; re_b = 0; wa_b = '0; ra_b = '0; wd_b = '0;
    // fill both completely
    for (int i = 0; i < 6144; i++) begin
      @(negedge clk);
      we_a = (i < 670); wa_a = 10'(i % 670); wd_a = 20'($urandom);
      we_b = 1'b1;      wa_b = 13'(i);       wd_b = 28'($urandom);
      if (i < 670) model_a[i] = wd_a;
      model_b[i] = wd_b;
    end
    @(negedge clk); we_a = 0; we_b = 0;
    // random reads with concurrent random writes
    for (int it = 0; it < 20000; it++) begin
      re_a = 1'b1; ra_a = 10'($urandom_range(0, 669));
      re_b = 1'b1; ra_b = 13'($urandom_range(0, 6143));
      we_a = $urandom_range(0, 1); we_b = $urandom_range(0, 1);
      // sometimes write the address being read
      wa_a = ($urandom_range(0, 3) == 0) ? ra_a : 10'($urandom_range(0, 669));
      wa_b = ($urandom_range(0, 3) == 0) ? ra_b : 13'($urandom_range(0, 6143));
      wd_a = 20'($urandom); wd_b = 28'($urandom);
      ea = model_a[ra_a]; eb = model_b[ra_b];
      if (we_a) model_a[wa_a] = wd_a;
      if (we_b) model_b[wa_b] = wd_b;
      @(negedge clk);
      check_a(ea, "read");
      check_b(eb, "read");
    end
    // hold with re low
    re_a = 0; re_b = 0; we_a = 0; we_b = 0;
    ea = rd_a; eb = rd_b;
    ra_a = 10'd5; ra_b = 13'd5;
    repeat (3) @(negedge clk);
    check_a(ea, "hold");
    check_b(eb, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("tb_sdp_ram: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
