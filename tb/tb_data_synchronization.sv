// tb_data_synchronization: checks the timing half of the DPWM at N = 10.
// Over several periods: the count must step by one per clock and wrap after
// 1024; P_S must be high from the middle of count 1023 to the middle of count
// 0; the duty word must take the input value present at the rising edge of P_S
// and ignore input changes at any other time (a change is made in the middle
// of each period).
module tb_data_synchronization;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = dpwm_pkg::DPWM_BITS;
  localparam int unsigned T = 2000;
  int checks = 0, failures = 0, loads = 0, mid_changes = 0;
  logic clk = 1'b0, v_r = 1'b0;
  initial #1 v_r = 1'b1;  // reset edge after time 0
  logic [N-1:0] in_data = '0, c_pe, d_r, gate_en, exp_dr, exp_cnt;
  logic p_s;

  data_synchronization dut (
    .clk(clk), .v_r(v_r), .in_data(in_data),
    .c_pe(c_pe), .p_s(p_s), .d_r(d_r), .clk_gate_en(gate_en)
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
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(c_pe == '0 && d_r == '0 && p_s == 1'b0, "reset state");
    v_r = 1'b0;
    exp_cnt = '0;
    exp_dr  = '0;
    in_data = N'($urandom);
    for (int c = 0; c < 5 * (1 << N); c++) begin
      @(posedge clk);
      #1;
      exp_cnt = N'(exp_cnt + 1);
      check(c_pe == exp_cnt, "count");
      check(p_s == (exp_cnt == '0), "P_S in first half of count");
      if (exp_cnt == 10'd300) begin
        in_data = N'($urandom);   // change in mid period
        mid_changes++;
      end
      if (exp_cnt == 10'd700) begin
        check(d_r == exp_dr, "mid-period input change ignored");
      end
      @(negedge clk);
      #1;
      check(p_s == (exp_cnt == '1), "P_S in second half of count");
      if (exp_cnt == '1) begin
        exp_dr = in_data;
        loads++;
      end
      check(d_r == exp_dr, "duty word");
    end
    check(loads == 5, "one load per period");
    $display("loads %0d, mid-period changes %0d", loads, mid_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
