// buffer_array: behavioural model (not synthesizable; the real part is a chain
// of large transistors) of the output stage that drives the load.
//
// The PMOS pulls v_dpwm high while d_pmos is low; the NMOS pulls it low while
// d_nmos is high. During the dead time both are off and the load capacitance
// keeps the last level, which this two-state model represents by holding the
// output. Both on at once would be a shoot-through; an assertion reports it.
// The output follows the drives after BUF_DELAY_PS.
//
// Interface: d_pmos, d_nmos in; v_dpwm out. Only the block's role is given by
// the document; the delay and the hold behaviour are this design's choices.
module buffer_array #(
  parameter int unsigned BUF_DELAY_PS = dpwm_pkg::BUF_DELAY_PS
) (
  input  logic d_pmos,
  input  logic d_nmos,
  output logic v_dpwm
);
  timeunit 1ps;
  timeprecision 1ps;

  logic level;  // level the stage drives (or holds)

  always @(d_pmos or d_nmos) begin
    assert (!(!d_pmos && d_nmos))
      else $error("buffer_array: PMOS and NMOS on together (shoot-through)");
    if (!d_pmos && !d_nmos)     level = 1'b1;  // pull-up only
    else if (d_pmos && d_nmos)  level = 1'b0;  // pull-down only
    // both off: hold
  end

  assign #(BUF_DELAY_PS) v_dpwm = level;
endmodule
