// tb_buffer_network: applies PWM-like pulses and checks that v_dpwm follows
// v_tpwm with both edges delayed by DEAD_TIME_PS + BUF_DELAY_PS, so the pulse
// width is kept, and that the gate drives show a dead time on every edge and
// never turn both transistors on.
module tb_buffer_network;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DT = dpwm_pkg::DEAD_TIME_PS;
  localparam int unsigned BD = dpwm_pkg::BUF_DELAY_PS;
  int checks = 0, failures = 0, overlaps = 0, dead = 0;
  logic v_tpwm = 1'b0;
  logic v_dpwm, d_pmos, d_nmos;

  buffer_network dut (
    .v_tpwm(v_tpwm), .v_dpwm(v_dpwm), .d_pmos(d_pmos), .d_nmos(d_nmos)
  );

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  always @(d_pmos or d_nmos) begin
    if (!d_pmos && d_nmos) overlaps++;
    if (d_pmos && !d_nmos) dead++;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    check(v_dpwm == 1'b0, "idle low");
    for (int i = 0; i < 50; i++) begin
      int w;
      realtime t_rise, t_fall;
      w = $urandom_range(1, 8);
      v_tpwm = 1'b1;
      t_rise = $realtime;
      @(posedge v_dpwm);
      check($realtime - t_rise == DT + BD, "rising edge delay");
      #(2000 - DT - BD);
      repeat (w - 1) #2000;
      v_tpwm = 1'b0;
      t_fall = $realtime;
      @(negedge v_dpwm);
      check($realtime - t_fall == DT + BD, "falling edge delay");
      repeat ($urandom_range(1, 4)) #2000;
    end
    check(overlaps == 0, "no shoot-through");
    check(dead == 100, "dead time on every edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
