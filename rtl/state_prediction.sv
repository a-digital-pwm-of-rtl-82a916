// state_prediction: next-state predictor of the DPWM clock counter.
//
// Given the counter's present state c_ne it gives the state the counter will
// take at the next rising clock edge, c_ns = c_ne + 1 modulo 2**N. Detecting the
// wrap on c_ns (c_ns == 0 while c_ne is all ones) lets the pre-synchronizer see
// the end of a PWM period one clock before the counter gets there.
//
// Purely combinational. The incrementer form follows from the up-counting
// period of 2**N clocks; the document gives only the circuit's function.
module state_prediction #(
  parameter int unsigned N = dpwm_pkg::DPWM_BITS
) (
  input  logic [N-1:0] c_ne,
  output logic [N-1:0] c_ns
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb c_ns = c_ne + N'(1);
endmodule
