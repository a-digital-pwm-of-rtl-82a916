// tb_data_register: checks that the duty-word register loads only on the
// rising edge of P_S. Random words are applied; between P_S pulses the input
// is changed several times and the output must keep the word captured at the
// last P_S edge. Asynchronous reset must clear it.
module tb_data_register;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = dpwm_pkg::DPWM_BITS;
  int checks = 0, failures = 0, loads = 0, ignored = 0;
  logic p_s = 1'b0, rst = 1'b0;
  initial #1 rst = 1'b1;  // reset edge after time 0
  logic [N-1:0] in_data = '0, d_r, held;

  data_register dut (.p_s(p_s), .rst(rst), .in_data(in_data), .d_r(d_r));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: d_r=%0d", msg, $time, d_r);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_data = 10'h3A5;
    #100;
    check(d_r == '0, "reset clears");
    rst = 1'b0;
    held = '0;
    for (int i = 0; i < 200; i++) begin
      in_data = N'($urandom);
      #100;
      p_s = 1'b1;           // load
      held = in_data;
      loads++;
      #10;
      check(d_r == held, "loaded at rising P_S");
      repeat (3) begin
        in_data = N'($urandom);
        #100;
        check(d_r == held, "held while P_S high or low");
        ignored++;
      end
      p_s = 1'b0;
      #10;
      check(d_r == held, "no load at falling P_S");
    end
    rst = 1'b1;
    #10;
    check(d_r == '0, "asynchronous reset");
    $display("loads %0d, ignored input changes %0d", loads, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
