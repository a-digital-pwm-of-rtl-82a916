// tb_cross_coupled_delay_generation: applies input pulses of several widths
// and checks the gate drives around each edge: on a rising input the NMOS
// turns off at once and the PMOS turns on DEAD_TIME_PS later; on a falling
// input the PMOS turns off at once and the NMOS turns on DEAD_TIME_PS later.
// A monitor counts any instant at which both transistors are on.
module tb_cross_coupled_delay_generation;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DT = dpwm_pkg::DEAD_TIME_PS;
  int checks = 0, failures = 0, overlaps = 0, dead_intervals = 0;
  logic v_tpwm = 1'b0;
  logic d_pmos, d_nmos;

  cross_coupled_delay_generation dut (.v_tpwm(v_tpwm), .d_pmos(d_pmos), .d_nmos(d_nmos));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (d_pmos=%b d_nmos=%b)", msg, $time, d_pmos, d_nmos);
    end
  endtask

  always @(d_pmos or d_nmos) if (!d_pmos && d_nmos) overlaps++;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    check(d_pmos == 1'b1 && d_nmos == 1'b1, "idle low: NMOS on, PMOS off");
    for (int i = 0; i < 50; i++) begin
      int w;
      w = $urandom_range(1, 5);
      v_tpwm = 1'b1;
      #1;
      check(d_nmos == 1'b0 && d_pmos == 1'b1, "rise: both off");
      if (d_nmos == 1'b0 && d_pmos == 1'b1) dead_intervals++;
      #(DT - 2);
      check(d_pmos == 1'b1, "rise: PMOS still off before dead time");
      #2;
      check(d_pmos == 1'b0 && d_nmos == 1'b0, "rise: PMOS on after dead time");
      #(2000 - DT - 1);
      repeat (w - 1) #2000;
      v_tpwm = 1'b0;
      #1;
      check(d_pmos == 1'b1 && d_nmos == 1'b0, "fall: both off");
      if (d_nmos == 1'b0 && d_pmos == 1'b1) dead_intervals++;
      #(DT - 2);
      check(d_nmos == 1'b0, "fall: NMOS still off before dead time");
      #2;
      check(d_nmos == 1'b1 && d_pmos == 1'b1, "fall: NMOS on after dead time");
      repeat ($urandom_range(1, 3)) #2000;
    end
    check(overlaps == 0, "never both on");
    $display("dead-time intervals %0d, overlaps %0d", dead_intervals, overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
