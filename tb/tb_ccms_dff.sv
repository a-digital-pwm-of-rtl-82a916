// tb_ccms_dff: checks the clock-gated conditional-capture flip-flop.
// Random data is applied before each rising edge. After the edge q must equal
// the data; the gate enable must have been 1 exactly when the data differed
// from q. The number of gated (suppressed) edges and passed edges are counted
// and both must occur. Asynchronous reset is checked at the start and midway.
module tb_ccms_dff;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T = 2000;
  int checks = 0, failures = 0, gated = 0, passed = 0;
  logic clk = 1'b0, rst = 1'b0, d = 1'b0;
  initial #1 rst = 1'b1;  // reset edge after time 0
  logic q, gate_en;

  ccms_dff dut (.clk(clk), .rst(rst), .d(d), .q(q), .gate_en(gate_en));

  always #(T/2) clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    check(q == 1'b0, "q low in reset");
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      logic exp_q, exp_en;
      @(negedge clk);
      if (i == 200) begin
        d = 1'b1;
        #(T/4);
        check(q == 1'b1 || q == 1'b0, "q settled");
      end
      d = 1'($urandom_range(0, 1));
      if (i % 7 == 0) d = q;  // force some held cycles
      exp_q  = d;
      exp_en = d ^ q;
      @(posedge clk);
      #1;
      check(gate_en == exp_en, "gate enable equals d != q");
      check(q == exp_q, "q captured d");
      if (exp_en) passed++; else gated++;
      if (i == 300) begin
        @(negedge clk);
        d = 1'b1;
        rst = 1'b1;
        #10;
        check(q == 1'b0, "asynchronous reset");
        rst = 1'b0;
      end
    end
    check(gated > 0, "some edges gated off");
    check(passed > 0, "some edges passed");
    $display("passed edges %0d, gated edges %0d", passed, gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
