// buffer_network: behavioural model of the DPWM output driver, made of the
// cross-coupled delay generation (dead time) and the buffer array.
//
// v_tpwm is turned into two non-overlapping gate drives, d_pmos and d_nmos,
// which switch the output stage. v_dpwm follows v_tpwm: a rising edge appears
// DEAD_TIME_PS + BUF_DELAY_PS later, a falling edge the same. The gate drives
// are brought out so the dead time can be observed.
//
// Interface: v_tpwm in; v_dpwm, d_pmos, d_nmos out. Structure follows the
// document; the delays are this design's choices.
module buffer_network #(
  parameter int unsigned DEAD_TIME_PS = dpwm_pkg::DEAD_TIME_PS,
  parameter int unsigned BUF_DELAY_PS = dpwm_pkg::BUF_DELAY_PS
) (
  input  logic v_tpwm,
  output logic v_dpwm,
  output logic d_pmos,
  output logic d_nmos
);
  timeunit 1ps;
  timeprecision 1ps;

  cross_coupled_delay_generation #(.DEAD_TIME_PS(DEAD_TIME_PS)) u_ccdg (
    .v_tpwm(v_tpwm),
    .d_pmos(d_pmos),
    .d_nmos(d_nmos)
  );

  buffer_array #(.BUF_DELAY_PS(BUF_DELAY_PS)) u_buf (
    .d_pmos(d_pmos),
    .d_nmos(d_nmos),
    .v_dpwm(v_dpwm)
  );
endmodule
