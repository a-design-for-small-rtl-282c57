// memory2: duty-ratio look-up table.
//
// Instead of computing the duty ratio every switching period, the controller keeps
// pre-calculated duty words here, one for every possible sensed output level.  The program
// counter sweeps this memory in step with the waveform counter, so that at the instant the
// comparator flips, the word on the output is the duty ratio for the level just sensed; the
// latch register then captures it as u(k).  The sweep starts at address a - b, which lets
// memory3 and memory4 shift the operating point along the table.
//
// Default contents (this design's choice): a proportional law
//   u = DUTY0 + KP * (REF_CODE - c(i - LUT_OFFSET)), clamped to 0..511,
// where c() is the default waveform, so with a - b = LUT_OFFSET the entry read at count m
// corresponds to the DAC level c(m).  KP is in duty steps (1/512) per DAC step.
//
// Timing: synchronous read, data valid one clock after addr.  Write port for run-time
// rewriting.
module duty_lut_mem
  import dpwm_pol_pkg::*;
#(
  parameter int unsigned AW = LUT_AW,
  parameter int unsigned DW = DUTY_W,
  parameter int          KP = KP_DEFAULT
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  logic [DW-1:0] mem [1 << AW];

  initial begin
    for (int i = 0; i < (1 << AW); i++) mem[i] = DW'(duty_entry(i, KP));
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    data <= mem[addr];
  end

endmodule
