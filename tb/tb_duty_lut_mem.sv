// Self-checking testbench for duty_lut_mem (memory2) at its defaults (1024 x 9, KP = 5).
// Every word is compared with the proportional law worked out here:
//   u(i) = clamp(128 + 5 * (202 - w(i - 256)), 0, 511)
// with w() the default reference waveform (w(m) = 255 for m < 0, 255-m up to 127,
// 127-4(m-128) after that, never below 0, and 0 past 255).  Also checks read latency and
// the write port.
module tb_duty_lut_mem;
  logic clk = 1'b0;
  logic [9:0] addr, waddr;
  logic [8:0] data, wdata;
  logic we = 1'b0;
  int checks = 0, failures = 0;

  duty_lut_mem dut (.clk, .addr, .data, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  function automatic int ref_wave(int m);
    int v;
    if (m < 0) return 255;
    if (m > 255) return 0;
    v = (m < 128) ? 255 - m : 127 - 4 * (m - 128);
    return (v < 0) ? 0 : v;
  endfunction

  function automatic int ref_duty(int i);
    int u;
    u = 128 + 5 * (202 - ref_wave(i - 256));
    return (u < 0) ? 0 : ((u > 511) ? 511 : u);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%0d data=%0d", what, addr, data); end
  endtask

  initial begin
    waddr = '0; wdata = '0; addr = '0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk) addr = 10'(i);
      @(negedge clk) check(data == 9'(ref_duty(i)), "default table");
    end
    // the entry for the reference level is the nominal duty 128/512
    @(negedge clk) addr = 10'(256 + 53);      // w(53) = 202
    @(negedge clk) check(data == 9'd128, "nominal duty at Vref");
    @(negedge clk) addr = 10'd300;
    #1 check(data == 9'd128, "old word held before the edge");
    @(negedge clk) check(data == 9'(ref_duty(300)), "new word after one clock");
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin we = 1'b1; waddr = 10'(1000 + i); wdata = 9'(i * 31); end
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) addr = 10'(1000 + i);
      @(negedge clk) check(data == 9'(i * 31), "rewritten word");
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
