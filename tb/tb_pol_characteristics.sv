// Static characteristics of the closed loop: output voltage against load current for
// each proportional gain K_P = 1, 3, 5, 7, 9 (I_O = 0..6 A, E_I = 6 V), and output voltage
// against input voltage (E_I = 3..8 V, I_O = 0.5 A) for K_P = 5, 7, 9.
//
// The controller runs at its default parameters with the behavioural DAC / comparator /
// buck model.  For each K_P the duty table (memory2) is rewritten at run time with
//   u(i) = clamp(128 + K_P * (202 - w(i - 256)), 0, 511),
// w() being the default reference waveform.  Pass criteria are the experimental claims:
// for K_P above 3 the mean output stays within 5 % of 1.5 V over the load range, and for
// K_P of 5 and above within 10 % over the input range.  Lower gains are reported only.
`timescale 1ns / 1ps
module tb_pol_characteristics;
  import dpwm_pol_pkg::*;

  logic clk = 1'b0, clk2x = 1'b0, rst_n = 1'b0;
  logic [7:0] c_m, count, y2_k;
  logic [8:0] u_k;
  logic v_comp, sense, miss, clamped, pwm, pwm_wrap;
  mem_wr_t mem_wr;
  real e_in = 6.0, i_load = 0.5, e_o, i_l;
  int checks = 0, failures = 0;

  dpwm_pol_controller dut (
    .clk, .clk2x, .rst_n, .c_m, .v_comp, .n1_k(8'd0), .mem_wr, .count, .y2_k, .u_k,
    .sense, .miss, .clamped, .pwm_wrap, .pwm
  );

  pol_plant_model plant (.clk2x, .pwm, .c_m, .e_in, .i_load, .v_comp, .e_o, .i_l);

  initial forever begin
    #7.5075;
    clk2x = ~clk2x;
    if (clk2x) clk = ~clk;
  end

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

  task automatic load_table(int kp);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      mem_wr.en = 1'b1; mem_wr.sel = MEM_DUTY;
      mem_wr.addr = LUT_AW'(i); mem_wr.data = COEF_W'(ref_duty(i - 256, kp));
    end
    @(negedge clk) mem_wr.en = 1'b0;
  endtask

  // settle, then average e_o over 150 us
  task automatic measure(output real mean);
    real acc;
    int n;
    #(600us);
    acc = 0.0; n = 0;
    repeat (5000) begin
      @(posedge clk);
      acc += e_o; n++;
    end
    mean = acc / n;
  endtask

  task automatic check(bit ok, string what, real v);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: e_o=%f", what, v); end
  endtask

  int kps [5] = '{1, 3, 5, 7, 9};

  initial begin
    real v;
    mem_wr = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    #(2ms);
    $display("I_O - E_O characteristic, E_I = 6 V");
    foreach (kps[k]) begin
      load_table(kps[k]);
      for (int io = 0; io <= 6; io++) begin
        i_load = real'(io);
        measure(v);
        $display("  K_P=%0d  I_O=%0d A  E_O=%6.4f V  (%6.2f %%)", kps[k], io, v, (v - 1.5) / 1.5 * 100.0);
        if (kps[k] > 3) check(v > 1.425 && v < 1.575, "load regulation within 5 %", v);
      end
    end
    $display("E_I - E_O characteristic, I_O = 0.5 A");
    i_load = 0.5;
    for (int k = 2; k < 5; k++) begin
      load_table(kps[k]);
      for (int ei = 3; ei <= 8; ei++) begin
        e_in = real'(ei);
        measure(v);
        $display("  K_P=%0d  E_I=%0d V  E_O=%6.4f V  (%6.2f %%)", kps[k], ei, v, (v - 1.5) / 1.5 * 100.0);
        check(v > 1.35 && v < 1.65, "line regulation within 10 %", v);
      end
      e_in = 6.0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
