// ccms_dff: conditional-capture D flip-flop with its own clock gate.
//
// A counter bit only needs a clock edge when its next value differs from the
// present one. This cell computes that condition (d != q), holds it in a latch
// that is transparent while clk is low, and ANDs the held value with clk. The
// storage flip-flop is clocked by the gated clock, so on cycles where d == q it
// sees no edge at all and burns no clock power. Functionally the cell is a
// rising-edge D flip-flop: after every rising clk edge q equals the d that was
// present just before it.
//
// Interface: clk, rst (active-high, asynchronous, clears q), d, q, and gate_en,
// the latched capture condition (1 while the coming/current rising edge is passed
// to the flip-flop), brought out so clock activity can be counted.
//
// The conditional-capture and clock-gating idea is the design's; the circuit
// (latch-based gate + flip-flop) is the simplest standard form of it and is this
// design's own choice. The latch in the clock gate is intentional.
module ccms_dff (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q,
  output logic gate_en
);
  timeunit 1ps;
  timeprecision 1ps;

  logic capture;  // next value differs from the stored one
  logic gclk;     // gated clock

  assign capture = d ^ q;

  // Enable latch: transparent while clk is low, so the condition is frozen
  // for the whole high phase and gclk cannot glitch.
  logic en_l;     // latched capture condition

  always_latch begin
    if (!clk) en_l = capture;
  end

  assign gate_en = en_l;
  assign gclk    = clk & en_l;

  always_ff @(posedge gclk or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= d;
  end
endmodule
