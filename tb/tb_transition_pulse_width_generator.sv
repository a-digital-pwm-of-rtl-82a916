// tb_transition_pulse_width_generator: start and end pulses are generated from
// a 16-count period model with a random end count D per period (D = 0 means no
// start pulse, as the interceptor would do). Both pulses are one clock wide and
// change at falling edges. The output must be high for exactly D clocks per
// period, must rise at the falling edge that starts V_SP and fall at the one
// that starts V_EP. A reset in mid-pulse must clear the output.
module tb_transition_pulse_width_generator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T = 2000;
  localparam int unsigned P = 16;
  int checks = 0, failures = 0, periods = 0, resets = 0;
  logic clk = 1'b0, v_r = 1'b0, v_sp = 1'b0, v_ep = 1'b0;
  initial #1 v_r = 1'b1;  // reset edge after time 0
  logic v_tpwm;

  transition_pulse_width_generator dut (.clk(clk), .v_r(v_r), .v_sp(v_sp), .v_ep(v_ep), .v_tpwm(v_tpwm));

  always #(T/2) clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(v_tpwm == 1'b0, "low in reset");
    v_r = 1'b0;
    for (int p = 0; p < 300; p++) begin
      int d, high;
      d = (p < P) ? p : $urandom_range(0, P - 1);
      if (p == 5) d = P - 1;
      high = 0;
      for (int c = 0; c < P; c++) begin
        @(negedge clk);
        v_sp = (c == 0) && (d != 0);
        v_ep = (c == d);
        #1;
        // the output just after this falling edge
        if (c == 0) check(v_tpwm == (d != 0), "rises with V_SP");
        if (c == d && d != 0) check(v_tpwm == 1'b0, "falls with V_EP");
        @(posedge clk);
        #1;
        if (v_tpwm) high++;
      end
      check(high == d, $sformatf("pulse width %0d clocks, expected %0d", high, d));
      periods++;
    end
    // reset in the middle of a pulse
    @(negedge clk);
    v_sp = 1'b1; v_ep = 1'b0;
    @(negedge clk);
    v_sp = 1'b0;
    #(T/4);
    check(v_tpwm == 1'b1, "pulse running before reset");
    v_r = 1'b1;
    #1;
    check(v_tpwm == 1'b0, "reset clears output");
    resets++;
    @(posedge clk);
    v_r = 1'b0;
    #1;
    check(v_tpwm == 1'b0, "stays low after reset");
    $display("periods %0d, resets %0d", periods, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
