// Hardware-logic digital controller for a point-of-load (POL) buck converter.
//
// The controller avoids the two delays of a conventional digital POL loop, the A/D
// conversion time and the time to compute the duty ratio.  The output voltage e_o is
// sensed by time instead of by an ADC: an 8-bit up counter on the system clock sweeps
// memory1 once per switching period (256 clocks, 130 kHz at 33.3 MHz), memory1's word c(m)
// drives an external ladder DAC, and an external analog comparator tells when the DAC
// level V'ref passes e_o (the ATC block).  The duty ratio is looked up, not computed: the PC
// sweeps memory2 in lock-step with the counter from the start address a - b, so the word
// read at the comparator's transition is already the duty ratio for the sensed level.  The
// latch register captures it as u(k), together with y2(k) (the count at the transition),
// y2(k-1) and n1(k-1), whose tables memory4 and memory3 give b and a for the next sweep.
// The DPWM compares u(k) with a 9-bit counter on the doubled clock.
//
// The DAC, the comparator, the PLL, the gate driver and the power stage are outside this
// module: c_m goes out to the DAC, v_comp comes in from the comparator, clk2x comes from the
// PLL and must have a rising edge on every rising edge of clk, and pwm goes to the driver.
// The block structure and all widths follow the design description; the sensing
// synchronizer, the default table contents, the memory write port and the meaning given
// to the n1 input (an external 8-bit value, latched with the other samples) are this
// design's own choices.
//
// Timing: sensing-to-u(k) latency is 1 + SYNC_STAGES system clocks after the DAC word that
// crossed e_o was addressed.  mem_wr writes one word of the selected memory per clock.
module dpwm_pol_controller
  import dpwm_pol_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2,
  parameter int          KP          = KP_DEFAULT
) (
  input  logic              clk,       // system clock f_CLK
  input  logic              clk2x,     // DPWM clock 2 x f_CLK from the PLL
  input  logic              rst_n,
  // ATC analog side
  output logic [WAVE_W-1:0] c_m,       // to the DAC
  input  logic              v_comp,    // from the analog comparator
  // controller inputs / observation
  input  logic [Y_W-1:0]    n1_k,
  input  mem_wr_t           mem_wr,
  output logic [CNT_W-1:0]  count,     // waveform counter m
  output logic [Y_W-1:0]    y2_k,
  output logic [DUTY_W-1:0] u_k,
  output logic              sense,     // u(k) was just latched
  output logic              miss,      // no comparator transition in the last period
  output logic              clamped,   // a - b was clamped at the last sweep start
  // DPWM
  output logic              pwm_wrap,  // last count of the DPWM period (clk2x domain)
  output logic              pwm
);

  logic              wrap;
  logic [LUT_AW-1:0] pc_addr;
  logic [DUTY_W-1:0] lut_data;
  logic [Y_W-1:0]    n1_km1, y2_km1;
  logic [COEF_W-1:0] coef_a, coef_b;
  logic [DUTY_W-1:0] dpwm_count;

  // ---- time base ----------------------------------------------------------------------
  // `run` rises on the first clk edge after reset; both counters start from it, so the
  // DPWM period stays aligned with the waveform period wherever reset is released.
  logic run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) run <= 1'b0;
    else        run <= 1'b1;
  end

  up_counter #(.WIDTH(CNT_W)) u_counter (
    .clk (clk), .rst_n (rst_n), .en (run), .count (count), .wrap (wrap)
  );

  // ---- ATC: reference waveform (memory1) ---------------------------------------------------
  wave_mem u_memory1 (
    .clk   (clk),
    .addr  (count),
    .c_m   (c_m),
    .we    (mem_wr.en && mem_wr.sel == MEM_WAVE),
    .waddr (mem_wr.addr[CNT_W-1:0]),
    .wdata (mem_wr.data[WAVE_W-1:0])
  );

  // ---- look-up table (memory2) and its program counter -------------------------------------
  pc_addr_gen u_pc (
    .clk (clk), .rst_n (rst_n), .wrap (wrap),
    .a (coef_a), .b (coef_b), .addr (pc_addr), .clamped (clamped)
  );

  duty_lut_mem #(.KP(KP)) u_memory2 (
    .clk   (clk),
    .addr  (pc_addr),
    .data  (lut_data),
    .we    (mem_wr.en && mem_wr.sel == MEM_DUTY),
    .waddr (mem_wr.addr),
    .wdata (mem_wr.data[DUTY_W-1:0])
  );

  // ---- latch register (Dff1..Dff4) --------------------------------------------------------
  sense_latch #(.SYNC_STAGES(SYNC_STAGES)) u_latch (
    .clk      (clk),
    .rst_n    (rst_n),
    .count    (count),
    .v_comp   (v_comp),
    .lut_data (lut_data),
    .n1_k     (n1_k),
    .y2_k     (y2_k),
    .n1_km1   (n1_km1),
    .y2_km1   (y2_km1),
    .u_k      (u_k),
    .sense    (sense),
    .miss     (miss)
  );

  // ---- memory3 (a) and memory4 (b) -------------------------------------------------------
  coef_lut_mem #(.INIT_VALUE(LUT_OFFSET)) u_memory3 (
    .clk   (clk),
    .addr  (n1_km1),
    .data  (coef_a),
    .we    (mem_wr.en && mem_wr.sel == MEM_COEF_A),
    .waddr (mem_wr.addr[Y_W-1:0]),
    .wdata (mem_wr.data)
  );

  coef_lut_mem #(.INIT_VALUE(0)) u_memory4 (
    .clk   (clk),
    .addr  (y2_km1),
    .data  (coef_b),
    .we    (mem_wr.en && mem_wr.sel == MEM_COEF_B),
    .waddr (mem_wr.addr[Y_W-1:0]),
    .wdata (mem_wr.data)
  );

  // ---- DPWM --------------------------------------------------------------------------------
  dpwm u_dpwm (
    .clk2x (clk2x),
    .rst_n (rst_n),
    .run   (run),
    .u_k   (u_k),
    .count (dpwm_count),
    .wrap  (pwm_wrap),
    .pwm   (pwm)
  );

  // The two time bases stay locked: just before every system clock edge the DPWM count is
  // 2 m + 1 for waveform count m, so both periods start on the same edge.
  a_locked: assert property (@(posedge clk) disable iff (!rst_n) run |-> dpwm_count == {count, 1'b1})
    else $error("DPWM counter is not locked to the waveform counter");

endmodule
