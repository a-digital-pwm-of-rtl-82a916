// tb_buffer_array: applies each legal gate-drive combination and checks the
// output: PMOS on -> high after BUF_DELAY_PS, NMOS on -> low after
// BUF_DELAY_PS, both off -> last level held. The output must not move before
// the delay has passed.
module tb_buffer_array;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned BD = dpwm_pkg::BUF_DELAY_PS;
  int checks = 0, failures = 0, holds = 0;
  logic d_pmos = 1'b1, d_nmos = 1'b1;
  logic v_dpwm;

  buffer_array dut (.d_pmos(d_pmos), .d_nmos(d_nmos), .v_dpwm(v_dpwm));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (v_dpwm=%b)", msg, $time, v_dpwm);
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
    #1000;
    check(v_dpwm == 1'b0, "NMOS on: low");
    for (int i = 0; i < 40; i++) begin
      logic lvl;
      lvl = v_dpwm;
      d_nmos = 1'b0;                 // both off
      #(BD + 10);
      check(v_dpwm == lvl, "both off: hold");
      holds++;
      if (lvl == 1'b0) begin
        d_pmos = 1'b0;               // pull up
        #(BD - 1);
        check(v_dpwm == 1'b0, "not yet high");
        #2;
        check(v_dpwm == 1'b1, "high after delay");
      end else begin
        d_pmos = 1'b1;               // back to both off, then pull down
        d_nmos = 1'b1;
        #(BD - 1);
        check(v_dpwm == 1'b1, "not yet low");
        #2;
        check(v_dpwm == 1'b0, "low after delay");
      end
      #200;
      // leave the PMOS-on state through both-off
      if (!d_pmos) begin
        d_pmos = 1'b1;
        #(BD + 10);
        check(v_dpwm == 1'b1, "held high after PMOS off");
        holds++;
      end
    end
    check(holds > 0, "hold seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
