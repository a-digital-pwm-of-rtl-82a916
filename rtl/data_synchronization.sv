// data_synchronization: the timing half of the DPWM. It holds the clock
// counter, the pre-synchronizer and the data register.
//
// The counter runs through 2**N counts per PWM period. During the last count
// the pre-synchronizer raises P_S (at the falling clock edge), and the rising
// edge of P_S loads the input word into the data register. The new duty word
// d_r is therefore stable half a clock before count 0 of the next period, and
// stays constant for the whole period.
//
// Interface: clk, v_r (active-high reset), in_data (duty word, bit 0 = LSB);
// outputs c_pe (count), p_s, d_r and clk_gate_en (clock-gate enables of the
// counter bits, for activity monitoring). Structure follows the document.
module data_synchronization #(
  parameter int unsigned N = dpwm_pkg::DPWM_BITS
) (
  input  logic         clk,
  input  logic         v_r,
  input  logic [N-1:0] in_data,
  output logic [N-1:0] c_pe,
  output logic         p_s,
  output logic [N-1:0] d_r,
  output logic [N-1:0] clk_gate_en
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N-1:0] c_ns;

  clock_counter #(.N(N)) u_counter (
    .clk    (clk),
    .rst    (v_r),
    .c_pe   (c_pe),
    .c_ns   (c_ns),
    .gate_en(clk_gate_en)
  );

  pre_synchronizer #(.N(N)) u_presync (
    .clk (clk),
    .rst (v_r),
    .c_ns(c_ns),
    .p_s (p_s)
  );

  data_register #(.N(N)) u_dreg (
    .p_s    (p_s),
    .rst    (v_r),
    .in_data(in_data),
    .d_r    (d_r)
  );
endmodule
