// memory3 / memory4: coefficient tables that place the duty-table sweep.
//
// memory3 is addressed by n1(k-1) and gives a; memory4 is addressed by y2(k-1), the
// previously sensed output level, and gives b.  The program counter starts each sweep of
// the duty table at a - b.  Word and address widths (11 and 8 bits) follow the design
// description; what the tables hold does not, so the default is a constant INIT_VALUE in
// every word (memory3: LUT_OFFSET, memory4: 0), which makes the controller purely
// proportional until the tables are rewritten.
//
// Timing: synchronous read, data valid one clock after addr.  Write port for run-time
// rewriting.
module coef_lut_mem
  import dpwm_pol_pkg::*;
#(
  parameter int unsigned AW         = Y_W,
  parameter int unsigned DW         = COEF_W,
  parameter int unsigned INIT_VALUE = 0
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
    for (int i = 0; i < (1 << AW); i++) mem[i] = DW'(INIT_VALUE);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    data <= mem[addr];
  end

endmodule
