// dpwm_top: N-bit digital pulse width modulator (DPWM) with a single clock.
//
// A free-running N-bit counter defines a PWM period of 2**N clocks. Once per
// period the sampling pulse P_S loads the duty word IN into the data register.
// The output goes high at count 0 and low when the count equals the duty word
// D, so V_DPWM is high for D of every 2**N clocks: duty D / 2**N, from 1/1024
// (0.1 %) to 1023/1024 (99.9 %) at N = 10; D = 0 keeps the output low. The
// counter's flip-flops are clock gated so each bit is clocked only when it
// toggles. The waveform passes through a dead-time driver to the output pin.
//
// Interface:
//   clk          single clock (500 MHz target)
//   v_r          active-high asynchronous reset (V_R)
//   in_data      duty word IN, bit 0 = LSB; sampled once per period
//   p_s          sampling pulse P_S, high from mid last count to mid count 0
//   v_dpwm       PWM output
//   clk_gate_en  clock-gate enables of the counter bits (activity monitor)
// Timing: a word applied to in_data before the rising edge of P_S is used for
// the period that starts at the next count 0. The digital pulse rises and falls
// at falling clock edges (mid count 0, mid count D); v_dpwm follows it after
// DEAD_TIME_PS + BUF_DELAY_PS.
//
// The block structure follows the document; reset, bit order, sampling edges
// and driver delays are this design's own choices (see README).
module dpwm_top #(
  parameter int unsigned N            = dpwm_pkg::DPWM_BITS,
  parameter int unsigned DEAD_TIME_PS = dpwm_pkg::DEAD_TIME_PS,
  parameter int unsigned BUF_DELAY_PS = dpwm_pkg::BUF_DELAY_PS
) (
  input  logic         clk,
  input  logic         v_r,
  input  logic [N-1:0] in_data,
  output logic         p_s,
  output logic         v_dpwm,
  output logic [N-1:0] clk_gate_en
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N-1:0] c_pe;
  logic [N-1:0] d_r;
  logic         v_sp, v_ep, v_tpwm;
  logic         d_pmos, d_nmos;

  data_synchronization #(.N(N)) u_sync (
    .clk        (clk),
    .v_r        (v_r),
    .in_data    (in_data),
    .c_pe       (c_pe),
    .p_s        (p_s),
    .d_r        (d_r),
    .clk_gate_en(clk_gate_en)
  );

  pulse_generator #(.N(N)) u_pgen (
    .clk   (clk),
    .v_r   (v_r),
    .c_pe  (c_pe),
    .d_r   (d_r),
    .v_sp  (v_sp),
    .v_ep  (v_ep),
    .v_tpwm(v_tpwm)
  );

  buffer_network #(
    .DEAD_TIME_PS(DEAD_TIME_PS),
    .BUF_DELAY_PS(BUF_DELAY_PS)
  ) u_buf (
    .v_tpwm(v_tpwm),
    .v_dpwm(v_dpwm),
    .d_pmos(d_pmos),
    .d_nmos(d_nmos)
  );
endmodule
