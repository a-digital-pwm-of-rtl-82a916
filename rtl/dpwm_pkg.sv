// dpwm_pkg: constants shared by the digital PWM (DPWM) blocks.
//
// DPWM_BITS is the resolution N. The PWM period is 2**N clock periods, so
// with N = 10 one period is 1024 clocks and the duty cycle steps by 1/1024
// (about 0.1 %). The clock period and the delays of the output driver models
// are given in picoseconds; the 2 ns clock (500 MHz) is the operating point the
// design targets, the driver delays are this design's own choice.
package dpwm_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DPWM_BITS    = 10;
  localparam int unsigned CLK_PERIOD_PS = 2000;  // 500 MHz
  localparam int unsigned DEAD_TIME_PS  = 100;   // own choice
  localparam int unsigned BUF_DELAY_PS  = 50;    // own choice
endpackage
