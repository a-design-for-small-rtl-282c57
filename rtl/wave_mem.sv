// memory1: reference waveform memory of the ATC (analog-to-timing conversion) block.
//
// The 8-bit up counter addresses this memory; its word c(m) drives an n-bit ladder DAC
// whose output V'ref = c(m)/2^n * (V+ref - V-ref) + V-ref is compared with the converter
// output e_o.  Any waveform may be stored.  The default contents are a piecewise-linear
// falling ramp: slope -1 code per clock from full scale (1.7 V) over the first KNEE_M
// addresses, which covers the region around the 1.5 V reference with one DAC step per clock,
// then a steep fall of STEEP codes per clock to zero (0.75 V), then flat.  That shape is
// this design's reading of the piecewise-linear detection idea; the knee and slopes are
// parameters of the package.
//
// Timing: synchronous read, c_m is valid one clock after addr.  Write port: one word per
// clock when we is high, for rewriting the waveform at run time.
module wave_mem
  import dpwm_pol_pkg::*;
#(
  parameter int unsigned AW = CNT_W,
  parameter int unsigned DW = WAVE_W
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] c_m,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  logic [DW-1:0] mem [1 << AW];

  initial begin
    for (int i = 0; i < (1 << AW); i++) mem[i] = DW'(wave_code(i));
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    c_m <= mem[addr];
  end

endmodule
