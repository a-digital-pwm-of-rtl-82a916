// magnitude_detector: makes the end-point pulse V_EP.
//
// Each count bit is compared with the matching duty-word bit (XNOR), and the N
// results are ANDed: the AND is 1 while c_pe == d_r. A falling-edge flip-flop
// samples it, so V_EP is high from the middle of count d_r to the middle of
// count d_r + 1. With d_r = 0 it fires at count 0, but the zero state
// interceptor has then suppressed the start pulse, so no PWM pulse results.
//
// Interface: clk, rst (active-high, asynchronous), c_pe, d_r, v_ep.
// The equality function follows the document; the falling sampling edge and the
// reset are this design's choices, matching the other pulse makers.
module magnitude_detector #(
  parameter int unsigned N = dpwm_pkg::DPWM_BITS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] c_pe,
  input  logic [N-1:0] d_r,
  output logic         v_ep
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N-1:0] bit_eq;  // per-bit XNOR
  logic         match;

  assign bit_eq = ~(c_pe ^ d_r);
  assign match  = &bit_eq;

  always_ff @(negedge clk or posedge rst) begin
    if (rst) v_ep <= 1'b0;
    else     v_ep <= match;
  end
endmodule
