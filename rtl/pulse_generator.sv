// pulse_generator: the waveform half of the DPWM. It holds the zero state
// interceptor, the magnitude detector and the transition pulse width generator.
//
// At count 0 the zero state interceptor gives the start pulse v_sp (unless the
// duty word is 0); at count d_r the magnitude detector gives the end pulse v_ep.
// The transition pulse width generator sets v_tpwm with v_sp and clears it with
// v_ep, so v_tpwm is high for d_r clocks of each 2**N-clock period. All three
// outputs change at falling clock edges.
//
// Interface: clk, v_r (active-high reset), c_pe, d_r; outputs v_sp, v_ep,
// v_tpwm. Structure follows the document.
module pulse_generator #(
  parameter int unsigned N = dpwm_pkg::DPWM_BITS
) (
  input  logic         clk,
  input  logic         v_r,
  input  logic [N-1:0] c_pe,
  input  logic [N-1:0] d_r,
  output logic         v_sp,
  output logic         v_ep,
  output logic         v_tpwm
);
  timeunit 1ps;
  timeprecision 1ps;

  zero_state_interceptor #(.N(N)) u_zsi (
    .clk (clk),
    .rst (v_r),
    .c_pe(c_pe),
    .d_r (d_r),
    .v_sp(v_sp)
  );

  magnitude_detector #(.N(N)) u_md (
    .clk (clk),
    .rst (v_r),
    .c_pe(c_pe),
    .d_r (d_r),
    .v_ep(v_ep)
  );

  transition_pulse_width_generator u_tpwg (
    .clk   (clk),
    .v_r   (v_r),
    .v_sp  (v_sp),
    .v_ep  (v_ep),
    .v_tpwm(v_tpwm)
  );
endmodule
