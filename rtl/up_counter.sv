// Free-running binary up counter with a wrap strobe.
//
// Two of these set the timing of the controller: an 8-bit counter on the system clock
// sweeps the reference-waveform memory once per switching period (33.3 MHz / 256 = 130 kHz),
// and a 9-bit counter on the doubled clock is the DPWM time base (66.6 MHz / 512, the same
// period).  The counter steps by one on every enabled clock and rolls over from all-ones to
// zero.  `wrap` is high in the cycle where the count is all-ones, so that logic clocked by
// the same edge can load a value that belongs to the period starting at count zero.
//
// Interface: clk, asynchronous active-low rst_n (clears to zero), en; count and wrap are
// registered/derived from the register, so they are valid right after the clock edge.
module up_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] count,
  output logic             wrap
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  count <= '0;
    else if (en) count <= count + 1'b1;
  end

  assign wrap = en && (count == {WIDTH{1'b1}});

endmodule
