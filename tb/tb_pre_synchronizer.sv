// tb_pre_synchronizer: drives the predicted-next-count input from a counter
// model in the testbench and checks P_S. P_S must be high from the falling edge
// in the last count (next count 0) to the falling edge in count 0: one clock
// per 1024-clock period. A random next-count sequence then checks the N-input
// NOR on values other than a plain count.
module tb_pre_synchronizer;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = dpwm_pkg::DPWM_BITS;
  localparam int unsigned T = 2000;
  int checks = 0, failures = 0, pulses = 0;
  logic clk = 1'b0, rst = 1'b0;
  initial #1 rst = 1'b1;  // reset edge after time 0
  logic [N-1:0] cnt, c_ns;
  logic p_s;

  pre_synchronizer dut (.clk(clk), .rst(rst), .c_ns(c_ns), .p_s(p_s));

  always #(T/2) clk = ~clk;
  assign c_ns = N'(cnt + 1);

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
    cnt = '0;
    repeat (2) @(posedge clk);
    check(p_s == 1'b0, "P_S low in reset");
    rst = 1'b0;
    for (int c = 0; c < 3 * (1 << N); c++) begin
      @(posedge clk);
      #1 cnt = N'(c + 1);
      // first half of the count: P_S from the previous falling edge
      #(T/4);
      check(p_s == (cnt == '0 && c > 0), "P_S in first half of count");
      @(negedge clk);
      #1;
      check(p_s == (cnt == '1), "P_S in second half of count");
      if (p_s) pulses++;
    end
    check(pulses == 3, "one P_S per period");
    $display("P_S pulses %0d", pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
