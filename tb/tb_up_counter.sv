// Self-checking testbench for up_counter at its default 8-bit width: the count must step
// by one per enabled clock, hold while en is low, roll over from 255 to 0, and raise wrap
// only in the all-ones cycle.  Reset must clear the count.
module tb_up_counter;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] count;
  logic wrap;
  int checks = 0, failures = 0;
  int expected;

  up_counter dut (.clk, .rst_n, .en, .count, .wrap);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: count=%0d expected=%0d wrap=%0b", what, count, expected, wrap);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    expected = 0;
    check(count == 0, "reset value");
    rst_n = 1'b1;
    en    = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (en) expected = (expected + 1) % (1 << W);
      check(count == W'(expected), "sequence");
      check(wrap == (en && expected == (1 << W) - 1), "wrap strobe");
      en = (i % 37) != 5;   // drop enable now and then
    end
    // no wrap while disabled, even at all-ones
    while (count != '1) @(negedge clk);
    en = 1'b0;
    #1 check(wrap == 1'b0, "wrap gated by en");
    rst_n = 1'b0;
    #1 check(count == 0, "asynchronous reset");
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
