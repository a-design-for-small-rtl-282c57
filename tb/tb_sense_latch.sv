// Self-checking testbench for sense_latch with its default two-stage synchronizer.
//
// The testbench plays the rest of the loop: an 8-bit counter, a "DAC word" that is the
// counter delayed one clock (as memory1 delivers it), a comparator that goes high once that
// word reaches a target count M, and a duty table that returns f(m) = (3m+7) mod 512 one
// clock after its address.  For each period it checks that exactly one load happens, that
// y2(k) = M, u(k) = f(M), y2(k-1) = the previous M, n1(k-1) = the n1 value at the load,
// that the load comes 1 + 2 clocks after the crossing word was addressed, and that the
// no-crossing case (comparator never high) loads at count 255 with miss set.
module tb_sense_latch;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] count = '0, dac_m, n1_k, y2_k, n1_km1, y2_km1;
  logic [8:0] lut_data, u_k;
  logic       v_comp, sense, miss;
  int         target;          // count at which the comparator goes high, 256 = never
  int checks = 0, failures = 0;

  sense_latch dut (.clk, .rst_n, .count, .v_comp, .lut_data, .n1_k,
                   .y2_k, .n1_km1, .y2_km1, .u_k, .sense, .miss);

  always #5 clk = ~clk;

  function automatic logic [8:0] f(int m);
    return 9'((3 * m + 7) % 512);
  endfunction

  always_ff @(posedge clk) begin
    count    <= rst_n ? count + 1'b1 : '0;
    dac_m    <= count;
    lut_data <= f(int'(count));
  end
  assign v_comp = (int'(dac_m) >= target);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: target=%0d y2=%0d u=%0d y2m1=%0d n1m1=%0d miss=%0b",
               what, target, y2_k, u_k, y2_km1, n1_km1, miss);
    end
  endtask

  int loads_in_period, load_count_val;
  int prev_target;
  int targets [9] = '{40, 41, 0, 100, 255, 256, 12, 128, 200};

  initial begin
    target = 40;
    n1_k   = 8'd0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // first period: let the design arm itself
    wait (count == 8'd10);
    prev_target = -1;
    for (int p = 0; p < 9; p++) begin
      // Set the target while the counter reads 0: from the next clock on, the DAC word is
      // count 0 of the new period, which is aligned count 0 inside the latch.
      @(negedge clk);
      while (count != 8'd0) @(negedge clk);
      target = targets[p];
      n1_k   = 8'(p * 17 + 1);
      loads_in_period = 0;
      // loads for aligned counts 0..255 are seen as strobes at counter values 4 .. 3
      for (int c = 0; c < 259; c++) begin
        @(posedge clk);
        #1;
        if (sense && c >= 3) begin
          loads_in_period++;
          load_count_val = int'(count);
        end
      end
      check(loads_in_period == 1, "exactly one load per period");
      if (target <= 255) begin
        check(y2_k == 8'(target), "y2(k) is the crossing count");
        check(u_k == f(target), "u(k) is the table word of the crossing count");
        check(miss == 1'b0 || loads_in_period != 1, "no miss on a crossing");
        // load edge is 3 clocks after the crossing count; strobe visible one clock later
        check(load_count_val == (target + 4) % 256, "latency 1+SYNC_STAGES");
      end else begin
        check(y2_k == 8'd255, "no crossing: loads at count 255");
        check(u_k == f(255), "no crossing: table word of count 255");
      end
      if (prev_target >= 0)
        check(y2_km1 == 8'(prev_target > 255 ? 255 : prev_target), "y2(k-1) is the previous y2(k)");
      check(n1_km1 == 8'(p * 17 + 1), "n1 latched at the load");
      prev_target = target;
    end
    // miss flag: find a period with no crossing
    target = 256;
    repeat (600) begin
      @(posedge clk); #1;
      if (sense) begin check(miss == 1'b1, "miss set when no crossing"); break; end
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
