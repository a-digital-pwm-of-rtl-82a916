// cross_coupled_delay_generation: behavioural model (not synthesizable; the real
// part is a transistor-level circuit) of the non-overlapping gate-drive
// generator in front of the output buffer.
//
// From the PWM waveform v_tpwm it makes two gate drives: d_pmos for the output
// PMOS (low = on) and d_nmos for the output NMOS (high = on). The circuit
// cross-couples the two paths through a delay so that a transistor turns on
// only DEAD_TIME_PS after the other has turned off, while turning off is
// immediate. For input pulses longer than the dead time (the shortest PWM pulse
// is one clock) this is the same as combining v_tpwm with a copy of itself
// delayed by DEAD_TIME_PS, which is how this model is written, without a
// feedback loop: PMOS on = v_tpwm AND delayed copy, NMOS on = NOR of the two.
// So on every edge of v_tpwm both transistors are off for DEAD_TIME_PS (the dead
// time), and they are never on together (no shoot-through current).
//
// Interface: v_tpwm in; d_pmos, d_nmos out. Timing: rising v_tpwm -> d_nmos
// falls at once, d_pmos falls DEAD_TIME_PS later; falling v_tpwm -> d_pmos rises
// at once, d_nmos rises DEAD_TIME_PS later. The dead-time function follows the
// document; the delay value and the drive polarities are this design's choices.
module cross_coupled_delay_generation #(
  parameter int unsigned DEAD_TIME_PS = dpwm_pkg::DEAD_TIME_PS
) (
  input  logic v_tpwm,
  output logic d_pmos,
  output logic d_nmos
);
  timeunit 1ps;
  timeprecision 1ps;

  logic v_dly;  // v_tpwm delayed by the dead time
  logic p_on;   // PMOS on
  logic n_on;   // NMOS on

  assign #(DEAD_TIME_PS) v_dly = v_tpwm;

  always_comb p_on = v_tpwm & v_dly;
  always_comb n_on = ~v_tpwm & ~v_dly;

  assign d_pmos = ~p_on;
  assign d_nmos = n_on;
endmodule
