// clock_counter: N-bit free-running binary up counter built from clock-gated
// conditional-capture flip-flops (ccms_dff).
//
// The count c_pe runs 0, 1, ..., 2**N-1, 0, ... so one PWM period is 2**N
// clocks. The state prediction block computes the next count c_ns = c_pe + 1;
// each bit's flip-flop loads its bit of c_ns, and its clock gate passes the
// clock only when that bit toggles. Bit i therefore is clocked on only one
// cycle in 2**i, instead of every cycle as in a plain counter.
//
// Interface: clk, rst (active-high, asynchronous, count to 0); outputs c_pe
// (present count, changes just after the rising edge), c_ns (predicted next
// count, combinational from c_pe) and gate_en (per-bit clock-gate enables,
// for activity monitoring).
//
// The counter of conditional-capture master-slave flip-flops and the state
// prediction output follow the document; binary coding and the reset are this
// design's own choices.
module clock_counter #(
  parameter int unsigned N = dpwm_pkg::DPWM_BITS
) (
  input  logic         clk,
  input  logic         rst,
  output logic [N-1:0] c_pe,
  output logic [N-1:0] c_ns,
  output logic [N-1:0] gate_en
);
  timeunit 1ps;
  timeprecision 1ps;

  state_prediction #(.N(N)) u_pred (
    .c_ne(c_pe),
    .c_ns(c_ns)
  );

  for (genvar i = 0; i < N; i++) begin : g_bit
    ccms_dff u_ff (
      .clk    (clk),
      .rst    (rst),
      .d      (c_ns[i]),
      .q      (c_pe[i]),
      .gate_en(gate_en[i])
    );
  end
endmodule
