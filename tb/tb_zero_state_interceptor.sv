// tb_zero_state_interceptor: the start pulse must be the falling-edge sample
// of (count == 0 AND duty word != 0). Count and duty word are driven with
// random values, biased so that count 0 and duty word 0 both occur often; the
// output is checked after every falling edge and held until the next one.
module tb_zero_state_interceptor;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = dpwm_pkg::DPWM_BITS;
  localparam int unsigned T = 2000;
  int checks = 0, failures = 0, fired = 0, intercepted = 0;
  logic clk = 1'b0, rst = 1'b0;
  initial #1 rst = 1'b1;  // reset edge after time 0
  logic [N-1:0] c_pe = '0, d_r = '0;
  logic v_sp, exp_sp;

  zero_state_interceptor dut (.clk(clk), .rst(rst), .c_pe(c_pe), .d_r(d_r), .v_sp(v_sp));

  always #(T/2) clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    check(v_sp == 1'b0, "low in reset");
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      #1;
      c_pe = ($urandom_range(0, 3) == 0) ? '0 : N'($urandom);
      d_r  = ($urandom_range(0, 3) == 0) ? '0 : N'($urandom);
      if (i % 50 == 0) d_r = N'(1 << $urandom_range(0, N - 1));  // single-bit words
      exp_sp = (c_pe == '0) && (d_r != '0);
      if (c_pe == '0 && d_r == '0) intercepted++;
      @(negedge clk);
      #1;
      check(v_sp == exp_sp, "V_SP after falling edge");
      if (v_sp) fired++;
      @(posedge clk);
      #1;
      check(v_sp == exp_sp, "V_SP held to next falling edge");
    end
    check(fired > 0 && intercepted > 0, "both start and interception seen");
    $display("start pulses %0d, intercepted %0d", fired, intercepted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
