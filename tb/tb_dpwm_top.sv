// tb_dpwm_top: end-to-end test of the complete DPWM with all parameters at
// their defaults (N = 10, 2 ns clock, 100 ps dead time, 50 ps buffer delay).
//
// Workload: duty word 7 (a short pulse with its start and end pulses), 0 (start
// pulse intercepted, output stays low), then the 20 states of a 10-bit Johnson
// counter (1, 3, 7, ... 1023, 1022, 1020, ... 512, 0), which sweeps the duty
// cycle from 0.1 % to 99.9 %. One word is applied per PWM period; in the middle
// of every period the input is first set to a junk value, which must be
// ignored, and then to the next word before P_S samples it.
//
// Each period (a window from one count 0 to the next) is checked against
// values computed here: number of output pulses (1, or 0 for word 0), pulse
// width = D x 2 ns, rise at 1 ns + dead time + buffer delay after count 0,
// duty = D / 1024 matching the figures 0.1 % ... 99.9 % to within 0.06 %, and
// 2046 counter clock edges per period (clock gating). Finally a reset in the
// middle of a pulse must stop the output and clear the count.
// Every mechanism (P_S, loads, start, end, interception, dead time, gated
// clock edges, ignored mid-period change, reset) is counted and must occur.
module tb_dpwm_top;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N  = dpwm_pkg::DPWM_BITS;
  localparam int unsigned T  = dpwm_pkg::CLK_PERIOD_PS;
  localparam int unsigned DT = dpwm_pkg::DEAD_TIME_PS;
  localparam int unsigned BD = dpwm_pkg::BUF_DELAY_PS;
  localparam int unsigned PERIOD_CLKS = 1 << N;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_ps = 0, n_loads = 0, n_sp = 0, n_ep = 0, n_intercept = 0, n_dead = 0;
  int n_gated = 0, n_ignored = 0, n_reset = 0, n_windows = 0;

  logic clk = 1'b0, v_r = 1'b0;
  initial #1 v_r = 1'b1;  // reset edge after time 0
  logic [N-1:0] in_data = '0, clk_gate_en;
  logic p_s, v_dpwm;

  dpwm_top dut (
    .clk(clk), .v_r(v_r), .in_data(in_data),
    .p_s(p_s), .v_dpwm(v_dpwm), .clk_gate_en(clk_gate_en)
  );

  always #(T/2) clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (40 * PERIOD_CLKS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  localparam int NWORDS = 23;
  int words [NWORDS];
  bit stop_windows = 0;

  function automatic logic [N-1:0] johnson_next(input logic [N-1:0] s);
    return {s[N-2:0], ~s[N-1]};
  endfunction

  // ---------------- per-period measurement ----------------
  realtime win_start, rise_t;
  int pulses, width, rise_off, act;
  int cur_word;
  bit have_cur = 0;
  bit window_has_sp, window_has_ep;
  int fig9 [10] = '{1, 3, 7, 15, 30, 61, 124, 249, 499, 999};  // tenths of a percent

  always @(posedge v_dpwm) begin
    rise_t   = $realtime;
    rise_off = int'(rise_t - win_start);
  end
  always @(negedge v_dpwm) begin
    width = int'($realtime - rise_t);
    pulses++;
  end
  always @(posedge clk) begin
    #1;
    act += $countones(clk_gate_en);
    n_gated += N - $countones(clk_gate_en);
  end
  always @(posedge p_s) n_ps++;
  always @(posedge dut.v_sp) window_has_sp = 1;
  always @(posedge dut.v_ep) window_has_ep = 1;
  always @(posedge dut.v_sp) n_sp++;
  always @(posedge dut.v_ep) n_ep++;
  always @(dut.d_pmos or dut.d_nmos) if (dut.d_pmos && !dut.d_nmos) n_dead++;

  task automatic evaluate(input int d);
    real duty;
    n_windows++;
    check(pulses == (d != 0 ? 1 : 0), $sformatf("D=%0d: %0d pulses", d, pulses));
    if (d != 0 && pulses == 1) begin
      check(width == d * int'(T), $sformatf("D=%0d: width %0d ps", d, width));
      check(rise_off == int'(T / 2 + DT + BD), $sformatf("D=%0d: rise offset %0d ps", d, rise_off));
    end
    if (d == 0) begin
      check(window_has_ep && !window_has_sp, "D=0: end pulse without start pulse");
      if (window_has_ep && !window_has_sp) n_intercept++;
    end
    check(act == 2 * PERIOD_CLKS - 2, $sformatf("counter clock edges %0d", act));
    duty = (pulses == 1) ? 100.0 * width / (PERIOD_CLKS * T) : 0.0;
    foreach (fig9[i]) if (d == (1 << (i + 1)) - 1) begin
      check(duty * 10.0 - fig9[i] < 0.6 && fig9[i] - duty * 10.0 < 0.6,
            $sformatf("duty %.2f %% against %0d.%0d %%", duty, fig9[i] / 10, fig9[i] % 10));
    end
    $display("period: D=%4d  pulses=%0d  width=%7d ps  duty=%6.2f %%", d, pulses, width, duty);
  endtask

  // windows run from mid count 1023 + half a clock, i.e. the start of count 0
  initial begin
    forever begin
      int next_word;
      @(posedge p_s);
      next_word = int'(in_data);
      n_loads++;
      #(T/2);
      if (stop_windows) break;
      if (have_cur) evaluate(cur_word);
      cur_word = next_word;
      have_cur = 1;
      win_start = $realtime;
      pulses = 0; width = 0; rise_off = -1; act = 0;
      window_has_sp = 0; window_has_ep = 0;
    end
  end

  initial begin
    logic [N-1:0] js;
    words[0] = 7;
    words[1] = 0;
    js = '0;
    for (int i = 0; i < 20; i++) begin
      js = johnson_next(js);
      words[2 + i] = int'(js);
    end
    words[22] = 1023;

    repeat (3) @(negedge clk);
    v_r = 1'b0;
    in_data = N'(words[0]);
    for (int k = 1; k < NWORDS; k++) begin
      @(posedge p_s);
      @(negedge p_s);
      in_data = N'($urandom);          // junk in mid period: must be ignored
      repeat (PERIOD_CLKS / 2) @(posedge clk);
      check(int'(dut.d_r) == words[k - 1], "mid-period input change ignored");
      n_ignored++;
      in_data = N'(words[k]);
    end
    // let the last word (1023) run one full period, then reset mid-pulse
    @(posedge p_s);
    @(posedge p_s);
    #(T);
    stop_windows = 1;
    repeat (PERIOD_CLKS / 4) @(posedge clk);
    check(v_dpwm == 1'b1, "output high before reset");
    #(T / 4);
    v_r = 1'b1;
    #1;
    check(dut.v_tpwm == 1'b0 && dut.d_r == '0, "reset clears pulse and word");
    #(DT + BD + 10);
    check(v_dpwm == 1'b0, "output low after reset");
    check(dut.c_pe == '0, "count cleared");
    n_reset++;
    v_r = 1'b0;
    repeat (10) @(posedge clk);
    check(v_dpwm == 1'b0, "output stays low after reset (word 0)");

    check(n_windows == NWORDS, $sformatf("periods evaluated %0d", n_windows));
    check(n_ps > 0, "P_S seen");
    check(n_loads > 0, "data loads seen");
    check(n_sp > 0, "start pulses seen");
    check(n_ep > 0, "end pulses seen");
    check(n_intercept > 0, "zero-state interception seen");
    check(n_dead > 0, "dead time seen");
    check(n_gated > 0, "gated clock edges seen");
    check(n_ignored > 0, "mid-period input changes seen");
    check(n_reset > 0, "reset seen");
    $display("mechanisms: P_S=%0d loads=%0d V_SP=%0d V_EP=%0d intercepted=%0d dead-times=%0d gated-edges=%0d ignored-changes=%0d resets=%0d",
             n_ps, n_loads, n_sp, n_ep, n_intercept, n_dead, n_gated, n_ignored, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
