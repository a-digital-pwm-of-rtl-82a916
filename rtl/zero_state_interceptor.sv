// zero_state_interceptor: makes the start-point pulse V_SP.
//
// V_SP marks the start of every PWM pulse: it fires when the count c_pe is 0.
// An N-input OR of the duty word d_r is ANDed in, so a duty word of 0 blocks
// the start pulse and the output stays low for the whole period. The result is
// sampled by a falling-edge flip-flop, so V_SP is high from the middle of count
// 0 to the middle of count 1.
//
// Interface: clk, rst (active-high, asynchronous), c_pe, d_r, v_sp.
// The OR/AND function follows the document; the falling sampling edge matches
// the pre-synchronizer and is this design's reading; the reset is its own.
module zero_state_interceptor #(
  parameter int unsigned N = dpwm_pkg::DPWM_BITS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] c_pe,
  input  logic [N-1:0] d_r,
  output logic         v_sp
);
  timeunit 1ps;
  timeprecision 1ps;

  logic count_zero;  // N-input NOR of the count
  logic duty_nz;     // N-input OR of the duty word

  assign count_zero = ~(|c_pe);
  assign duty_nz    = |d_r;

  always_ff @(negedge clk or posedge rst) begin
    if (rst) v_sp <= 1'b0;
    else     v_sp <= count_zero & duty_nz;
  end
endmodule
