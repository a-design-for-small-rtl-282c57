// DPWM: 9-bit up counter on the doubled clock and a digital comparator.
//
// The counter runs at f_CLK' = 2 x f_CLK, so its 512 counts span exactly one switching
// period of the 256-count waveform counter.  The digital comparator drives PWM high while
// the count is below u(k): duty = u(k)/512, from 0 to 511/512.  u(k) is compared directly,
// not through a shadow register (this design's choice), so a duty word latched early in a
// period still lengthens or shortens the pulse under way; that is what keeps the delay
// between sensing and actuation short.
//
// Timing: `run` comes from the system-clock domain and rises right after a rising edge of
// clk, in the clk cycle in which the waveform counter still reads zero.  The DPWM counter is
// enabled by it, so it steps to 1 at the following falling edge of clk and to 2 together
// with the waveform counter's first step: DPWM count = 2 x waveform count in the first half
// of every clk cycle and 2 x count + 1 in the second, and both periods start on the same
// edge.  pwm is registered: it reflects the count one clk2x cycle
// earlier.  u_k comes from the system-clock domain; both clocks are from one PLL with
// coincident rising edges, so no synchronizer is used.
module dpwm
  import dpwm_pol_pkg::*;
(
  input  logic              clk2x,
  input  logic              rst_n,
  input  logic              run,      // system-clock domain start enable
  input  logic [DUTY_W-1:0] u_k,
  output logic [DUTY_W-1:0] count,
  output logic              wrap,     // last count of the DPWM period
  output logic              pwm
);

  up_counter #(.WIDTH(DUTY_W)) u_cnt (
    .clk   (clk2x),
    .rst_n (rst_n),
    .en    (run),
    .count (count),
    .wrap  (wrap)
  );

  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) pwm <= 1'b0;
    else        pwm <= (count < u_k);
  end

endmodule
