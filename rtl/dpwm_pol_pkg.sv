// Shared constants, types and table-generating functions of the DPWM point-of-load
// (POL) controller.
//
// The controller senses the output voltage without an A/D converter: a stored waveform
// c(m) is played out through a D/A converter once per switching period, and the instant
// at which the analog comparator flips is captured as a counter value.  The duty ratio is
// not computed but read from a table swept in step with the same counter.
//
// Sizes that follow the design description: 8-bit time base and waveform words, 10-bit
// duty-table address, 11-bit coefficient words, 9-bit duty word, DPWM clock = 2 x f_CLK,
// V+ref = 1.7 V, V-ref = 0.75 V, Vref = 1.5 V.  The default table contents below (the
// piecewise-linear waveform, the proportional duty table, the coefficient tables) are this
// design's own choice; every memory can be rewritten at run time through its write port.
package dpwm_pol_pkg;

  // ---- widths -----------------------------------------------------------------------
  localparam int unsigned CNT_W  = 8;   // system up counter / memory1 address
  localparam int unsigned WAVE_W = 8;   // c(m), DAC word (n bits)
  localparam int unsigned LUT_AW = 10;  // memory2 address (PC)
  localparam int unsigned DUTY_W = 9;   // u(k), DPWM counter
  localparam int unsigned COEF_W = 11;  // memory3 / memory4 word (a, b)
  localparam int unsigned Y_W    = 8;   // y2(k), n1(k)

  // ---- analog reference levels (millivolts), used to build default tables -------------
  localparam int VREF_HI_MV = 1700;     // V+ref = Vref + a
  localparam int VREF_LO_MV = 750;      // V-ref
  localparam int VREF_MV    = 1500;     // output reference

  // ---- default table shape ------------------------------------------------------------
  // memory1: fine segment of slope -1 code/clock from full scale down to KNEE_CODE, then a
  // steep segment of slope -STEEP codes/clock down to zero, then flat at zero.
  localparam int KNEE_M     = 128;
  localparam int STEEP      = 4;
  // memory2: u = DUTY0 + KP * (REF_CODE - c(m - LUT_OFFSET)), clamped to the 9-bit range.
  localparam int KP_DEFAULT = 5;
  localparam int DUTY0      = 128;      // 1.5 V / 6 V * 512
  localparam int LUT_OFFSET = 256;      // default a - b, centres the sweep in memory2
  localparam int BASE_MAX   = (1 << LUT_AW) - (1 << CNT_W);

  // DAC code whose level is Vref, rounded: (1500-750)/(1700-750)*256 = 202.
  localparam int REF_CODE = ((VREF_MV - VREF_LO_MV) * (1 << WAVE_W)
                             + (VREF_HI_MV - VREF_LO_MV) / 2) / (VREF_HI_MV - VREF_LO_MV);

  // ---- run-time table write port -------------------------------------------------------
  typedef enum logic [1:0] {
    MEM_WAVE = 2'd0,   // memory1
    MEM_DUTY = 2'd1,   // memory2
    MEM_COEF_A = 2'd2, // memory3
    MEM_COEF_B = 2'd3  // memory4
  } mem_sel_e;

  typedef struct packed {
    logic              en;
    mem_sel_e          sel;
    logic [LUT_AW-1:0] addr;
    logic [COEF_W-1:0] data;
  } mem_wr_t;

  // Default reference waveform c(m); m outside 0..255 is clamped.
  function automatic int wave_code(int m);
    int mm;
    int c;
    mm = (m < 0) ? 0 : ((m > (1 << CNT_W) - 1) ? (1 << CNT_W) - 1 : m);
    if (mm < KNEE_M) c = (1 << WAVE_W) - 1 - mm;
    else             c = (1 << WAVE_W) - 1 - KNEE_M - STEEP * (mm - KNEE_M);
    if (c < 0) c = 0;
    return c;
  endfunction

  // Default proportional duty table entry for memory2 address i.
  function automatic int duty_entry(int i, int kp);
    int u;
    u = DUTY0 + kp * (REF_CODE - wave_code(i - LUT_OFFSET));
    if (u < 0) u = 0;
    if (u > (1 << DUTY_W) - 1) u = (1 << DUTY_W) - 1;
    return u;
  endfunction

endpackage
