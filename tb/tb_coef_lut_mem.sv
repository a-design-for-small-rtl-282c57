// Self-checking testbench for coef_lut_mem (memory3 / memory4): two instances, the default
// one (all words 0) and one built like memory3 (all words 256).  Checks the initial
// contents, one-clock read latency, and 11-bit writes and read-back on both.
module tb_coef_lut_mem;
  logic clk = 1'b0;
  logic [7:0]  addr, waddr;
  logic [10:0] d0, d1, wdata;
  logic we = 1'b0;
  int checks = 0, failures = 0;
  logic [10:0] expect_w [256];

  coef_lut_mem                     dut_b (.clk, .addr, .data(d0), .we, .waddr, .wdata);
  coef_lut_mem #(.INIT_VALUE(256)) dut_a (.clk, .addr, .data(d1), .we(1'b0), .waddr, .wdata);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%0d d0=%0d d1=%0d", what, addr, d0, d1); end
  endtask

  initial begin
    addr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) addr = 8'(i);
      @(negedge clk);
      check(d0 == 11'd0, "memory4 default");
      check(d1 == 11'd256, "memory3 default");
    end
    for (int i = 0; i < 256; i++) begin
      expect_w[i] = 11'($urandom_range(0, 2047));
      @(negedge clk) begin we = 1'b1; waddr = 8'(i); wdata = expect_w[i]; end
    end
    @(negedge clk) we = 1'b0;
    for (int i = 255; i >= 0; i--) begin
      @(negedge clk) addr = 8'(i);
      @(negedge clk);
      check(d0 == expect_w[i], "written word");
      check(d1 == 11'd256, "other instance untouched");
    end
    @(negedge clk) addr = 8'd7;
    #1 check(d0 == expect_w[0], "old word held before the edge");
    @(negedge clk) check(d0 == expect_w[7], "new word after one clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
