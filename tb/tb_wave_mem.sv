// Self-checking testbench for wave_mem (memory1).  Reads all 256 words and compares them
// with the default piecewise-linear waveform worked out here (255-m for m<128, then
// 127-4(m-128) down to zero), checks the one-clock read latency and that the waveform is
// non-increasing, then rewrites a few words and reads them back.
module tb_wave_mem;
  logic clk = 1'b0;
  logic [7:0] addr, waddr, wdata, c_m;
  logic we = 1'b0;
  int checks = 0, failures = 0;

  wave_mem dut (.clk, .addr, .c_m, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  function automatic int ref_wave(int m);
    int v;
    if (m < 128) v = 255 - m;
    else v = 127 - 4 * (m - 128);
    return (v < 0) ? 0 : v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%0d c_m=%0d", what, addr, c_m); end
  endtask

  initial begin
    int prev;
    waddr = '0; wdata = '0; addr = '0;
    prev = 256;
    for (int m = 0; m < 256; m++) begin
      @(negedge clk) addr = 8'(m);
      @(negedge clk);
      check(c_m == 8'(ref_wave(m)), "default waveform");
      check(int'(c_m) <= prev, "non-increasing");
      prev = int'(c_m);
    end
    // latency: change address, output must still show the old word before the edge
    @(negedge clk) addr = 8'd10;
    @(negedge clk) addr = 8'd200;
    #1 check(c_m == 8'(ref_wave(10)), "one-clock latency (old word held)");
    @(negedge clk) check(c_m == 8'(ref_wave(200)), "one-clock latency (new word)");
    // run-time rewrite (triangle fragment)
    for (int m = 0; m < 8; m++) begin
      @(negedge clk) begin we = 1'b1; waddr = 8'(m + 40); wdata = 8'(m * 30); end
    end
    @(negedge clk) we = 1'b0;
    for (int m = 0; m < 8; m++) begin
      @(negedge clk) addr = 8'(m + 40);
      @(negedge clk) check(c_m == 8'(m * 30), "rewritten word");
    end
    @(negedge clk) addr = 8'd48;
    @(negedge clk) check(c_m == 8'(ref_wave(48)), "neighbour untouched");
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
