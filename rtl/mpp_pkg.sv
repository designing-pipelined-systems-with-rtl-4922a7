// mpp_pkg: constants shared by the mesochronous pipelined (MPP) multiplier.
//
// The multiplier reduces N partial products with N carry-save layers of
// full adders and then resolves the remaining sum/carry pair with N layers
// of half adders, so the array is 2N adder layers deep. Those layers are
// split evenly over NUM_STAGES wave-pipelined stages that sit between
// NUM_STAGES+1 register stages. The timing numbers are the cell and
// register figures of the 180 nm implementation; RTL does not use them for
// logic, but testbenches and the clock-delay model use them to build a
// timed model and to evaluate the clock-period bounds
//   conventional:  Tclk >= Dmax + DR + ts + dclk
//   mesochronous:  Tclk >= dmax(j) - dmin(j) + ts + th + 2*dclk.
// Operand width, stage count and timing values follow the document; the
// clock uncertainty dclk = 10 ps is read from its budget 2*dclk = 20 ps.
`timescale 1ps / 1ps
package mpp_pkg;

  // Datapath organisation
  localparam int unsigned OPERAND_WIDTH = 8;   // M in the text: 8x8-bit
  localparam int unsigned NUM_STAGES    = 4;   // wave-pipelined stages
  localparam int unsigned NUM_REG_STAGES = NUM_STAGES + 1;

  // Cell and register timing, picoseconds
  localparam int unsigned FA_DMIN_PS         = 210;
  localparam int unsigned FA_DMAX_PS         = 280;
  localparam int unsigned FA_MIN_INTERVAL_PS = 175;
  localparam int unsigned SAFF_TSETUP_PS     = 10;
  localparam int unsigned SAFF_THOLD_PS      = 130;
  localparam int unsigned SAFF_CLK_TO_Q_PS   = 295;
  localparam int unsigned SAFF_CLK_HIGH_PS   = 160;
  localparam int unsigned CLK_UNCERTAINTY_PS = 10;
  localparam int unsigned TCLK_PS            = 350;

  // Largest delay difference a wave-pipelined stage may have at clock
  // period tclk_ps: dmax - dmin <= Tclk - (ts + th + 2*dclk).
  function automatic int unsigned max_delay_difference_ps(int unsigned tclk_ps);
    return tclk_ps - (SAFF_TSETUP_PS + SAFF_THOLD_PS + 2 * CLK_UNCERTAINTY_PS);
  endfunction

  // Shortest clock period of a conventional pipeline whose slowest stage
  // has delay dmax_ps.
  function automatic int unsigned conventional_tclk_ps(int unsigned dmax_ps);
    return dmax_ps + SAFF_CLK_TO_Q_PS + SAFF_TSETUP_PS + CLK_UNCERTAINTY_PS;
  endfunction

endpackage
