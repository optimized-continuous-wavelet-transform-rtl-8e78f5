// Self-checking testbench of one CWT multiplier: signed 20-bit times unsigned
// 8-bit, product registered one cycle later, hold while ce is low, valid
// flag following in_valid. Includes the extreme operands (-2^19 x 255 and
// (2^19 - 1) x 255) and random ones.
module tb_cwt_mult;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic ce, in_valid, out_valid;
  logic signed [19:0] a;
  logic [7:0] b;
  logic signed [27:0] p;

  cwt_mult #(.AW_(20), .BW_(8)) dut (.*);

  int checks = 0, failures = 0;

  task automatic apply(int av, int bv, bit v);
    longint exp;
    @(negedge clk);
    ce = 1'b1; in_valid = v; a = 20'(av); b = 8'(bv);
    exp = longint'(av) * longint'(bv);
    @(negedge clk);
    ce = 1'b0;
    checks += 2;
    if (longint'(p) != exp) begin
      failures++;
      if (failures < 10) $display("%0d x %0d = %0d, expected %0d", av, bv, p, exp);
    end
    if (out_valid != v) failures++;
    // hold with ce low
    a = 20'($urandom); b = 8'($urandom); in_valid = !v;
    @(negedge clk);
    checks++;
    if (longint'(p) != exp || out_valid != v) failures++;
  endtask

  initial begin
    ce = 0; in_valid = 0; a = '0; b = '0;
    #1 rst_n = 1'b0;  // falling edge before the first clock: the asynchronous reset acts at once
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (out_valid !== 1'b0 || p !== '0) failures++;
    apply(-(1 << 19), 255, 1'b1);
    apply((1 << 19) - 1, 255, 1'b1);
    apply(-1, 1, 1'b0);
    apply(0, 200, 1'b1);
    for (int i = 0; i < 2000; i++)
      apply(int'($urandom_range(0, (1 << 20) - 1)) - (1 << 19), int'($urandom_range(0, 255)), 1'($urandom));
    // back-to-back products with ce held high
    @(negedge clk);
    ce = 1'b1; in_valid = 1'b1;
    for (int i = 0; i < 100; i++) begin
      a = 20'(i * 3001 - 150000); b = 8'(i * 7);
      @(negedge clk);
      checks++;
      if (longint'(p) != longint'(i * 3001 - 150000) * longint'((i * 7) % 256)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("tb_cwt_mult: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
