// Self-checking testbench for dpwm.  For a set of duty words, including 0 and 511, the
// number of clk2x cycles with pwm high in one 512-cycle period must equal u(k), the pulse
// must be a single run starting with the period, and the wrap strobe must mark count 511.
module tb_dpwm;
  logic       clk2x = 1'b0, rst_n = 1'b0;
  logic [8:0] u_k, count;
  logic       wrap, pwm;
  int checks = 0, failures = 0;

  dpwm dut (.clk2x, .rst_n, .run(rst_n), .u_k, .count, .wrap, .pwm);

  always #4 clk2x = ~clk2x;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: u=%0d count=%0d", what, u_k, count); end
  endtask

  int duties [8] = '{0, 1, 128, 255, 256, 300, 510, 511};

  initial begin
    int high, edges;
    logic prev;
    u_k = '0;
    repeat (2) @(negedge clk2x);
    rst_n = 1'b1;
    for (int k = 0; k < 8 + 6; k++) begin
      // change u during count 511 so the next period uses it throughout
      while (count != 9'd511) @(negedge clk2x);
      check(wrap == 1'b1, "wrap at count 511");
      u_k = (k < 8) ? 9'(duties[k]) : 9'($urandom_range(0, 511));
      high = 0; edges = 0; prev = 1'b0;
      // pwm is registered: period samples are the 512 cycles after count 0 is reached
      @(negedge clk2x);   // count 0
      for (int c = 0; c < 512; c++) begin
        @(negedge clk2x);
        if (pwm) high++;
        if (pwm && !prev) edges++;
        prev = pwm;
        if (c < 511) check(wrap == (count == 9'd511), "wrap only at 511");
      end
      check(high == int'(u_k), "high time equals u(k)");
      check(edges == (u_k != 0 ? 1 : 0), "one pulse per period");
      // the 512-cycle window ends on count 0 of the next period; step back one so the
      // while loop above finds count 511 of that period
      repeat (510) @(negedge clk2x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
