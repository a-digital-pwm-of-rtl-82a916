// tb_pulse_generator: drives the count from a counter model and a new duty
// word each period (0, 1, 2, 7, 1023, 512 and random ones) and checks, for
// every period, that V_SP fires once at count 0 unless the word is 0, that
// V_EP fires once at count D, and that V_TPWM is high for exactly D clocks,
// rising at the falling edge of count 0 and falling at the falling edge of
// count D.
module tb_pulse_generator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = dpwm_pkg::DPWM_BITS;
  localparam int unsigned T = 2000;
  localparam int unsigned PERIODS = 14;
  int checks = 0, failures = 0;
  logic clk = 1'b0, v_r = 1'b0;
  initial #1 v_r = 1'b1;  // reset edge after time 0
  logic [N-1:0] c_pe = '0, d_r = '0;
  logic v_sp, v_ep, v_tpwm;

  pulse_generator dut (
    .clk(clk), .v_r(v_r), .c_pe(c_pe), .d_r(d_r),
    .v_sp(v_sp), .v_ep(v_ep), .v_tpwm(v_tpwm)
  );

  always #(T/2) clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat ((PERIODS + 2) * (1 << N)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int words [PERIODS];
    words = '{0, 1, 2, 7, 1023, 512, 0, 3, 1022, 0, 0, 0, 0, 0};
    for (int k = 9; k < PERIODS; k++) words[k] = $urandom_range(0, (1 << N) - 1);
    repeat (2) @(negedge clk);
    v_r = 1'b0;
    for (int p = 0; p < PERIODS; p++) begin
      int d, high, sp_n, ep_n, rise_at, fall_at;
      d = words[p];
      high = 0; sp_n = 0; ep_n = 0; rise_at = -1; fall_at = -1;
      for (int c = 0; c < (1 << N); c++) begin
        logic prev_out;
        @(posedge clk);
        #1;
        c_pe = N'(c);
        if (c == 0) d_r = N'(d);
        prev_out = v_tpwm;
        @(negedge clk);
        #1;
        if (v_sp) sp_n++;
        if (v_ep) ep_n++;
        if (!prev_out && v_tpwm) rise_at = c;
        if (prev_out && !v_tpwm) fall_at = c;
        #(T/2 - 10);
        if (v_tpwm) high++;
      end
      check(sp_n == (d != 0 ? 1 : 0), $sformatf("D=%0d start pulses %0d", d, sp_n));
      check(ep_n == 1, $sformatf("D=%0d end pulses %0d", d, ep_n));
      check(high == d, $sformatf("D=%0d high for %0d clocks", d, high));
      if (d != 0) begin
        check(rise_at == 0, $sformatf("D=%0d rises at count %0d", d, rise_at));
        check(fall_at == d, $sformatf("D=%0d falls at count %0d", d, fall_at));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
