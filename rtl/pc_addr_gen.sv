// Duty-table program counter ("a-b" and "PC").
//
// The duty table (memory2) is swept once per switching period, one address per system
// clock, in lock-step with the waveform counter.  At the start of every period the PC is
// loaded with the initial value a - b, from memory3 and memory4; afterwards it adds one
// per clock.  So during a period the PC reads address (a - b) + m, where m is the waveform
// counter.  The subtraction and the 10-bit address follow the design description.  The
// clamp of a - b to 0 .. 1024-256, which keeps a whole sweep inside the table, is this
// design's choice, as is the reset value RESET_BASE.
//
// Timing: `wrap` is the waveform counter's last-count strobe; the PC takes a - b at that
// edge, so it holds a - b when the counter reads zero.  addr is a register.
module pc_addr_gen
  import dpwm_pol_pkg::*;
#(
  parameter int unsigned RESET_BASE = LUT_OFFSET
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wrap,
  input  logic [COEF_W-1:0] a,
  input  logic [COEF_W-1:0] b,
  output logic [LUT_AW-1:0] addr,
  output logic              clamped   // a - b was outside the usable range at the last load
);

  logic signed [COEF_W+1:0] diff;
  logic [LUT_AW-1:0]        base;
  logic                     clip;

  always_comb begin
    diff = $signed({2'b00, a}) - $signed({2'b00, b});
    clip = 1'b0;
    if (diff < 0) begin
      base = '0;
      clip = 1'b1;
    end else if (diff > (COEF_W+2)'(BASE_MAX)) begin
      base = LUT_AW'(BASE_MAX);
      clip = 1'b1;
    end else begin
      base = diff[LUT_AW-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr    <= LUT_AW'(RESET_BASE);
      clamped <= 1'b0;
    end else if (wrap) begin
      addr    <= base;
      clamped <= clip;
    end else begin
      addr    <= addr + 1'b1;
    end
  end

endmodule
