// tb_magnitude_detector: the end pulse must be the falling-edge sample of
// (count == duty word). Random words are used, with equal values forced often
// and near n_miss (one bit different) forced too, so each bit's comparison is
// exercised.
module tb_magnitude_detector;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = dpwm_pkg::DPWM_BITS;
  localparam int unsigned T = 2000;
  int checks = 0, failures = 0, n_match = 0, n_miss = 0;
  logic clk = 1'b0, rst = 1'b0;
  initial #1 rst = 1'b1;  // reset edge after time 0
  logic [N-1:0] c_pe = '0, d_r = '0;
  logic v_ep, exp_ep;

  magnitude_detector dut (.clk(clk), .rst(rst), .c_pe(c_pe), .d_r(d_r), .v_ep(v_ep));

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
    check(v_ep == 1'b0, "low in reset");
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      #1;
      d_r = N'($urandom);
      case ($urandom_range(0, 2))
        0:       c_pe = d_r;
        1:       c_pe = d_r ^ N'(1 << $urandom_range(0, N - 1));
        default: c_pe = N'($urandom);
      endcase
      exp_ep = (c_pe == d_r);
      @(negedge clk);
      #1;
      check(v_ep == exp_ep, "V_EP after falling edge");
      if (exp_ep) n_match++; else n_miss++;
      @(posedge clk);
      #1;
      check(v_ep == exp_ep, "V_EP held to next falling edge");
    end
    check(n_match > 0 && n_miss > 0, "both outcomes seen");
    $display("n_match %0d, n_miss %0d", n_match, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
