// pre_synchronizer: makes the once-per-period sampling pulse P_S.
//
// An N-input NOR of the predicted next count c_ns is 1 during the last count of
// a period (present count all ones, next count zero). A flip-flop on the falling
// clock edge samples it, so P_S is high from the middle of the last count to the
// middle of count 0: one clock wide, and free of the NOR's settling glitches
// because it is sampled half a clock after the counter moved. Using c_ns rather
// than the present count puts P_S a whole clock earlier, so the data register
// (clocked by the rising edge of P_S) is loaded before the new period begins.
//
// Interface: clk, rst (active-high, asynchronous, P_S low), c_ns, p_s.
// NOR on the next state and the opposite-edge flip-flop follow the document;
// the reset is this design's own choice.
module pre_synchronizer #(
  parameter int unsigned N = dpwm_pkg::DPWM_BITS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] c_ns,
  output logic         p_s
);
  timeunit 1ps;
  timeprecision 1ps;

  logic wrap;  // N-input NOR

  assign wrap = ~(|c_ns);

  always_ff @(negedge clk or posedge rst) begin
    if (rst) p_s <= 1'b0;
    else     p_s <= wrap;
  end
endmodule
