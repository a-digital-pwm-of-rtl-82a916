// tb_clock_counter: checks the N = 10 clock-gated counter over three full
// periods. After reset the count must step 0, 1, 2, ... and wrap after 1023,
// c_ns must always be the count plus one, and the period must be 1024 clocks.
// Clock activity: over one period bit i may receive only 1024 / 2**i clock
// edges (2046 in total instead of 10240 for an ungated counter); the enables
// sampled at each rising edge are counted per bit and compared.
module tb_clock_counter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = dpwm_pkg::DPWM_BITS;
  localparam int unsigned T = 2000;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b0;
  initial #1 rst = 1'b1;  // reset edge after time 0
  logic [N-1:0] c_pe, c_ns, gate_en;
  int edges [N];
  int total;

  clock_counter dut (.clk(clk), .rst(rst), .c_pe(c_pe), .c_ns(c_ns), .gate_en(gate_en));

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
    logic [N-1:0] expect_cnt;
    repeat (3) @(posedge clk);
    check(c_pe == '0, "reset count");
    @(negedge clk) rst = 1'b0;
    expect_cnt = '0;
    for (int p = 0; p < 3; p++) begin
      foreach (edges[i]) edges[i] = 0;
      for (int c = 0; c < (1 << N); c++) begin
        check(c_pe == expect_cnt, "count value");
        check(c_ns == N'(expect_cnt + 1), "predicted next state");
        @(posedge clk);
        #1;
        for (int i = 0; i < N; i++) if (gate_en[i]) edges[i]++;
        expect_cnt = N'(expect_cnt + 1);
        @(negedge clk);
      end
      check(c_pe == '0, "wrap after 1024 clocks");
      total = 0;
      for (int i = 0; i < N; i++) begin
        check(edges[i] == ((1 << N) >> i), $sformatf("bit %0d clock edges %0d", i, edges[i]));
        total += edges[i];
      end
      check(total == 2 * (1 << N) - 2, "total clock edges per period");
    end
    $display("clock edges per period: %0d of %0d", total, N * (1 << N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
