// transition_pulse_width_generator: turns the start pulse V_SP and the end
// pulse V_EP into the PWM waveform V_TPWM.
//
// V_TPWM rises with V_SP and falls with V_EP, so the pulse width includes the
// start pulse's clock and excludes the end pulse's clock: with start at count 0
// and end at count D the output is high for exactly D clocks of every 2**N.
// It is a set/reset function built without a latch loop:
//   v_tpwm = (v_sp | held) & ~v_ep
// where held is v_tpwm sampled at the rising clock edge. V_SP and V_EP change
// only at falling edges, so held never samples a changing value and V_TPWM
// changes only at falling edges. Reset has priority over set, and end over start.
//
// Interface: clk, v_r (active-high, asynchronous reset of held), v_sp, v_ep,
// v_tpwm. Set at V_SP, clear at V_EP and the V_R input follow the document; the
// circuit realising it is this design's own.
module transition_pulse_width_generator (
  input  logic clk,
  input  logic v_r,
  input  logic v_sp,
  input  logic v_ep,
  output logic v_tpwm
);
  timeunit 1ps;
  timeprecision 1ps;

  logic held;

  always_comb v_tpwm = (v_sp | held) & ~v_ep & ~v_r;

  always_ff @(posedge clk or posedge v_r) begin
    if (v_r) held <= 1'b0;
    else     held <= v_tpwm;
  end
endmodule
