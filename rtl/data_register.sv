// data_register: N-bit parallel-in parallel-out register that holds the duty
// word D_R for one PWM period.
//
// It is clocked by the rising edge of the sampling pulse P_S, which occurs once
// per period, in the middle of the last count. A change of the input word in
// the middle of a period therefore only takes effect at the next period.
//
// Interface: p_s (load clock), rst (active-high, asynchronous, clears D_R so
// the output stays low until the first load), in_data, d_r. Bit 0 is the least
// significant bit. Clocking by P_S follows the document; the reset is this
// design's own choice.
module data_register #(
  parameter int unsigned N = dpwm_pkg::DPWM_BITS
) (
  input  logic         p_s,
  input  logic         rst,
  input  logic [N-1:0] in_data,
  output logic [N-1:0] d_r
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge p_s or posedge rst) begin
    if (rst) d_r <= '0;
    else     d_r <= in_data;
  end
endmodule
