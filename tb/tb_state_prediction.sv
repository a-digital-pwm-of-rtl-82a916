// tb_state_prediction: exhaustive check of the next-state predictor at N = 10.
// Every present state 0..1023 is applied and the output compared with
// (state + 1) mod 1024, worked out in the testbench. The wrap 1023 -> 0, which
// the pre-synchronizer relies on, is counted separately.
module tb_state_prediction;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = dpwm_pkg::DPWM_BITS;
  int checks = 0, failures = 0, wraps = 0;
  logic [N-1:0] c_ne, c_ns;

  state_prediction dut (.c_ne(c_ne), .c_ns(c_ns));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      int exp_v;
      c_ne = N'(v);
      #10;
      exp_v = (v == (1 << N) - 1) ? 0 : v + 1;
      checks++;
      if (int'(c_ns) != exp_v) begin
        failures++;
        $display("FAIL c_ne=%0d c_ns=%0d expected %0d", v, c_ns, exp_v);
      end
      if (c_ns == '0) wraps++;
    end
    checks++;
    if (wraps != 1) begin
      failures++;
      $display("FAIL wrap seen %0d times", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
