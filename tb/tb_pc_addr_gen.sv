// Self-checking testbench for pc_addr_gen.  A 256-clock period is generated with a wrap
// strobe on its last clock; for several (a, b) pairs the PC must hold a - b at count 0 and
// step by one per clock, and a - b below 0 or above 768 must be clamped (clamped flag set).
module tb_pc_addr_gen;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  count = '0;
  logic        wrap;
  logic [10:0] a, b;
  logic [9:0]  addr;
  logic        clamped;
  int checks = 0, failures = 0;

  pc_addr_gen dut (.clk, .rst_n, .wrap, .a, .b, .addr, .clamped);

  always #5 clk = ~clk;
  always_ff @(posedge clk) count <= rst_n ? count + 1'b1 : '0;
  assign wrap = (count == 8'hff);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: a=%0d b=%0d count=%0d addr=%0d", what, a, b, count, addr); end
  endtask

  int av [7] = '{256, 300, 100, 2047, 0, 768, 1000};
  int bv [7] = '{0,   44,  200, 0,    0, 0,   231};

  initial begin
    int base;
    a = 11'd256; b = '0;
    repeat (2) @(negedge clk);
    check(addr == 10'd256, "reset base");
    rst_n = 1'b1;
    // first period after reset runs from the reset base
    for (int c = 0; c < 256; c++) begin
      check(int'(addr) == 256 + int'(count), "reset-base sweep");
      @(negedge clk);
    end
    for (int k = 0; k < 7; k++) begin
      a = 11'(av[k]); b = 11'(bv[k]);
      base = av[k] - bv[k];
      if (base < 0) base = 0;
      if (base > 768) base = 768;
      // the new a - b is taken at the next wrap
      while (count != 8'd255) @(negedge clk);
      @(negedge clk);
      for (int c = 0; c < 256; c++) begin
        check(int'(addr) == base + int'(count), "sweep address = (a-b) + m");
        check(clamped == ((av[k] - bv[k]) < 0 || (av[k] - bv[k]) > 768), "clamp flag");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
