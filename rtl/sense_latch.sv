// Latch register: output-voltage sensing and the four sampling flip-flops Dff1..Dff4.
//
// Once per switching period the stored waveform falls through the DAC from above the
// output voltage to below it, and the analog comparator output V_comp goes from low to
// high when V'ref passes e_o.  The counter value at that instant is a digital measure of
// e_o, and the duty-table word being read at that instant is the duty ratio for it.  This
// block finds that instant and, at the same clock edge, loads
//   Dff1: y2(k)   <- counter value m at the crossing (the sensed level)
//   Dff2: n1(k-1) <- the n1 input
//   Dff3: y2(k-1) <- the previous content of Dff1
//   Dff4: u(k)    <- the duty-table word for count m
// which is the shared-clock arrangement of the four flip-flops.
//
// V_comp is asynchronous to the system clock, so it passes a SYNC_STAGES flip-flop
// synchronizer (this design's choice).  The counter value and the duty-table word are
// delayed to line up with it: the waveform word reaches the DAC one clock after its
// address, and the synchronizer adds SYNC_STAGES, so m is delayed by 1 + SYNC_STAGES and
// the (already one-clock) table word by SYNC_STAGES.  The sensing window is one aligned
// period, aligned count 0..255.  The first cycle in the window whose synchronized V_comp
// is high is the sensing instant; this is the low-to-high edge after the waveform jump,
// and it also covers e_o above the waveform's top (sensed at count 0).  If V_comp never
// goes high (e_o below the waveform's bottom) the latches are loaded at aligned count 255
// and `miss` is pulsed.  Exactly one load happens per period after the first.
//
// Outputs are registered; `sense` is a one-cycle strobe in the cycle after the load edge.
module sense_latch
  import dpwm_pol_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CNT_W-1:0]  count,     // system up counter (memory1 address)
  input  logic              v_comp,    // analog comparator output, asynchronous
  input  logic [DUTY_W-1:0] lut_data,  // memory2 output, one clock after its address
  input  logic [Y_W-1:0]    n1_k,
  output logic [Y_W-1:0]    y2_k,      // Dff1
  output logic [Y_W-1:0]    n1_km1,    // Dff2
  output logic [Y_W-1:0]    y2_km1,    // Dff3
  output logic [DUTY_W-1:0] u_k,       // Dff4
  output logic              sense,
  output logic              miss
);

  localparam int unsigned LAT = 1 + SYNC_STAGES;

  logic [SYNC_STAGES-1:0] vsync;
  logic [DUTY_W-1:0]      lut_pipe [SYNC_STAGES];
  logic [CNT_W-1:0]       m_al;
  logic                   sensed;
  logic                   new_period, last_count, load;

  // V_comp synchronizer and the matching delay of the duty-table word
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vsync <= '0;
      for (int i = 0; i < int'(SYNC_STAGES); i++) lut_pipe[i] <= '0;
    end else begin
      vsync <= {vsync[SYNC_STAGES-2:0], v_comp};
      lut_pipe[0] <= lut_data;
      for (int i = 1; i < int'(SYNC_STAGES); i++) lut_pipe[i] <= lut_pipe[i-1];
    end
  end

  // count value whose DAC level the synchronized comparator output reflects
  assign m_al       = count - CNT_W'(LAT);
  assign new_period = (m_al == '0);
  assign last_count = (m_al == {CNT_W{1'b1}});
  assign load       = (new_period || !sensed) && (vsync[SYNC_STAGES-1] || last_count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sensed <= 1'b1;          // no load before the first aligned period begins
      y2_k   <= '0;
      n1_km1 <= '0;
      y2_km1 <= '0;
      u_k    <= '0;
      sense  <= 1'b0;
      miss   <= 1'b0;
    end else begin
      sense <= load;
      miss  <= load && !vsync[SYNC_STAGES-1];
      if (load) begin
        sensed <= 1'b1;
        y2_k   <= m_al;
        n1_km1 <= n1_k;
        y2_km1 <= y2_k;
        u_k    <= lut_pipe[SYNC_STAGES-1];
      end else if (new_period) begin
        sensed <= 1'b0;
      end
    end
  end

  initial assert (SYNC_STAGES >= 2) else $error("sense_latch: SYNC_STAGES must be at least 2");

endmodule
