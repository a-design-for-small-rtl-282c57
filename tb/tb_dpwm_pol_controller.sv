// Closed-loop testbench of dpwm_pol_controller at its default parameters.
//
// The controller drives a behavioural DAC / comparator / buck converter (pol_plant_model)
// with the experimental component values: L = 10 uH, C_O = 470 uF, Vref = 1.5 V, f_CLK =
// 33.3 MHz (switching period 256 clocks, 130 kHz), DPWM clock 66.6 MHz.  The run goes
// through start-up from 0 V, a load step 0.5 A -> 5 A and back, input voltages 3, 6 and
// 8 V, a run-time rewrite of the duty table for KP = 9, and a start-address shift through
// memory3 (including one that has to be clamped).
//
// Checked on every latch event: u(k) equals the proportional law worked out here for the
// sensed count y2(k) (which proves the table sweep and the sensing are aligned), and at
// most one latch per switching period.  The switching period is checked on every period:
// 512 clk2x cycles, 7.69 us (130 kHz), ending together with the 256-count waveform period.  Checked on every DPWM period in which u(k) did not
// change: the number of high clk2x cycles equals u(k).  Checked at each operating point:
// the mean output voltage is within 5 % of 1.5 V (10 % at the input-voltage extremes).
// Counted, and a failure if they never happen: comparator crossings, no-crossing periods
// (start-up), a change of u(k) inside a PWM pulse, the load steps, the table rewrite and
// the clamp of a - b.
`timescale 1ns / 1ps
module tb_dpwm_pol_controller;
  import dpwm_pol_pkg::*;

  logic clk = 1'b0, clk2x = 1'b0, rst_n = 1'b0;
  logic [7:0] c_m, count, y2_k, n1_k;
  logic [8:0] u_k;
  logic v_comp, sense, miss, clamped, pwm, pwm_wrap;
  mem_wr_t mem_wr;
  real e_in = 6.0, i_load = 0.5, e_o, i_l;

  int checks = 0, failures = 0;
  int n_cross = 0, n_miss = 0, n_midpulse = 0, n_clamp = 0, n_steps = 0, n_rewrite = 0;
  int kp_now = 5;
  int lut_offset_now = 256;

  dpwm_pol_controller dut (
    .clk, .clk2x, .rst_n, .c_m, .v_comp, .n1_k, .mem_wr, .count, .y2_k, .u_k,
    .sense, .miss, .clamped, .pwm_wrap, .pwm
  );

  pol_plant_model plant (
    .clk2x, .pwm, .c_m, .e_in, .i_load, .v_comp, .e_o, .i_l
  );

  // 66.6 MHz and 33.3 MHz from one source, rising edges coincide
  initial forever begin
    #7.5075;
    clk2x = ~clk2x;
    if (clk2x) clk = ~clk;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at %0t: e_o=%f y2=%0d u=%0d", what, $time, e_o, y2_k, u_k);
    end
  endtask

  // ---- independent reference of the duty law ------------------------------------------
  function automatic int ref_wave(int m);
    int v;
    if (m < 0) return 255;
    if (m > 255) return 0;
    v = (m < 128) ? 255 - m : 127 - 4 * (m - 128);
    return (v < 0) ? 0 : v;
  endfunction

  function automatic int ref_duty(int m, int kp);
    int u;
    u = 128 + kp * (202 - ref_wave(m));
    return (u < 0) ? 0 : ((u > 511) ? 511 : u);
  endfunction

  // ---- per-latch checks -------------------------------------------------------------------
  int latches_this_period = 0;
  logic check_law = 1'b1;
  // A latch strobe seen at counter value c belongs to aligned count c - 4 (two synchronizer
  // stages, the memory1 read and the strobe register), so a period's strobes fall between
  // counter values 4 and 3.
  always @(posedge clk) begin
    if (rst_n && count == 8'd4) begin
      check(latches_this_period <= 1, "at most one latch per period");
      latches_this_period = 0;
    end
    if (rst_n && sense) begin
      if (miss) n_miss++; else n_cross++;
      if (check_law)
        check(int'(u_k) == ref_duty(int'(y2_k) + lut_offset_now - 256, kp_now),
              "u(k) is the table word for the sensed count");
      latches_this_period++;
    end
  end

  // ---- per-DPWM-period check --------------------------------------------------------------
  int high_cnt = 0;
  logic u_changed = 1'b0;
  logic [8:0] u_start;
  logic was_high = 1'b0;
  always @(posedge clk2x) begin
    if (rst_n) begin
      if (pwm) high_cnt++;
      if (u_k != u_start) begin
        if (pwm && !u_changed) n_midpulse++;   // new duty word arrived while the pulse was on
        u_changed = 1'b1;
      end
      if (pwm_wrap) begin
        // pwm is registered, so this period's last sample is seen on the next edge
        was_high = 1'b1;
      end else if (was_high) begin
        if (!u_changed && u_start != 0) check(high_cnt == int'(u_start), "PWM high time equals u(k)");
        high_cnt  = pwm ? 1 : 0;
        u_changed = 1'b0;
        u_start   = u_k;
        was_high  = 1'b0;
      end
    end
  end

  // ---- switching rate: one DPWM period = 512 clk2x cycles = 256 clk cycles = 130 kHz ----
  int cyc2x = 0, n_periods = 0;
  realtime last_wrap = 0;
  always @(posedge clk2x) begin
    if (rst_n) begin
      cyc2x++;
      if (pwm_wrap) begin
        if (n_periods > 0) begin
          check(cyc2x == 512, "DPWM period is 512 clk2x cycles");
          check(($realtime - last_wrap) > 7.6e3 && ($realtime - last_wrap) < 7.8e3,
                "switching period 7.69 us (130 kHz)");
        end
        check(count == 8'd255, "DPWM period ends with the waveform period");
        n_periods++;
        cyc2x = 0;
        last_wrap = $realtime;
      end
    end
  end

  // ---- helpers --------------------------------------------------------------------------
  task automatic wait_us(real us);
    #(us * 1000.0);
  endtask

  task automatic mean_eo(real us, output real mean, output real vmin, output real vmax);
    real acc;
    int n;
    acc = 0.0; n = 0; vmin = 1.0e9; vmax = -1.0e9;
    repeat (int'(us * 1000.0 / 30.03)) begin
      @(posedge clk);
      acc += e_o; n++;
      if (e_o < vmin) vmin = e_o;
      if (e_o > vmax) vmax = e_o;
    end
    mean = acc / n;
  endtask

  task automatic regulate(string what, real tol);
    real m, lo, hi;
    mean_eo(200.0, m, lo, hi);
    $display("%-28s Ei=%4.1f V Io=%4.1f A: mean e_o=%6.4f V (min %6.4f, max %6.4f), u=%0d",
             what, e_in, i_load, m, lo, hi, u_k);
    check(m > 1.5 * (1.0 - tol) && m < 1.5 * (1.0 + tol), what);
  endtask

  task automatic write_mem(mem_sel_e sel, int addr, int data);
    @(negedge clk);
    mem_wr.en = 1'b1; mem_wr.sel = sel;
    mem_wr.addr = LUT_AW'(addr); mem_wr.data = COEF_W'(data);
    @(negedge clk);
    mem_wr.en = 1'b0;
  endtask

  task automatic mechanism(int n, string what);
    $display("mechanism %-34s %0d", what, n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    real m, lo, hi, dip;
    mem_wr = '0;
    n1_k   = 8'd0;
    u_start = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    // start-up from 0 V and steady state at the nominal point
    wait_us(3000.0);
    regulate("steady state", 0.05);

    // load step 0.5 A -> 5 A
    i_load = 5.0; n_steps++;
    mean_eo(50.0, m, dip, hi);
    $display("load step 0.5->5 A: minimum e_o in 50 us = %6.4f V", dip);
    wait_us(800.0);
    regulate("after step up", 0.05);

    // load step 5 A -> 0.5 A
    i_load = 0.5; n_steps++;
    mean_eo(50.0, m, lo, dip);
    $display("load step 5->0.5 A: maximum e_o in 50 us = %6.4f V", dip);
    wait_us(800.0);
    regulate("after step down", 0.05);

    // input voltage range
    e_in = 3.0;  wait_us(800.0); regulate("input 3 V", 0.10);
    e_in = 8.0;  wait_us(800.0); regulate("input 8 V", 0.10);
    e_in = 6.0;  wait_us(500.0);

    // rewrite the duty table for KP = 9 while running
    check_law = 1'b0;
    for (int i = 0; i < 1024; i++) write_mem(MEM_DUTY, i, ref_duty(i - 256, 9));
    kp_now = 9; n_rewrite++;
    repeat (300) @(posedge clk);
    check_law = 1'b1;
    wait_us(800.0);
    regulate("KP = 9 table", 0.05);

    // shift the sweep start through memory3: a = 266, so the entry read at count m is the
    // one written for m + 10
    check_law = 1'b0;
    write_mem(MEM_COEF_A, 0, 266);
    lut_offset_now = 266;
    repeat (600) @(posedge clk);
    check_law = 1'b1;
    wait_us(300.0);
    // a = 2000 is beyond the table: the PC start must be clamped
    check_law = 1'b0;
    write_mem(MEM_COEF_A, 0, 2000);
    repeat (600) @(posedge clk);
    if (clamped) n_clamp++;
    write_mem(MEM_COEF_A, 0, 256);
    lut_offset_now = 256;
    repeat (600) @(posedge clk);
    check(!clamped, "clamp released");
    check_law = 1'b1;
    wait_us(800.0);
    regulate("after start-address tests", 0.05);

    mechanism(n_cross,    "comparator crossing latched");
    mechanism(n_miss,     "period without crossing");
    mechanism(n_midpulse, "u(k) changed during a PWM pulse");
    mechanism(n_steps,    "load step");
    mechanism(n_rewrite,  "run-time duty table rewrite");
    mechanism(n_clamp,    "start address clamped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
