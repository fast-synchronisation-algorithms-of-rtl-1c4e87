// tb_sync_controller: plays the event sequence of a burst (activity, gain
// and phase adjustments, transition, symbol ticks, burst end) and checks
// that coarse acquisition starts at the first gain adjustment, timing
// alignment is armed at the second phase adjustment, ft_load comes on
// symbol tick 14 after the transition (13 when the divider skipped a centre
// sample), data_en covers exactly data_len ticks, fine_active rises after
// the first data tick, and burst end clears everything with a clear pulse.
`timescale 1ns/1ps
module tb_sync_controller;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic activity = 0, gain_adj = 0, phase_adj = 0, toggle = 0, sym_tick = 0, burst_end = 0, skip = 0;
  logic [9:0] data_len = 10'd20;
  logic cpa_go, sta_go, start_cpa, start_sta, toggled, ft_load, ft_enable, fine_active, data_en, clear;
  int checks = 0, failures = 0;

  sync_controller dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_cpa_go = 0, n_sta_go = 0, n_clear = 0;
  always @(posedge clk) begin
    if (cpa_go) n_cpa_go++;
    if (sta_go) n_sta_go++;
    if (clear) n_clear++;
  end

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0; repeat (3) @(negedge clk);
  endtask

  task automatic run(input bit with_skip, input int dl);
    int load_at, n_data;
    data_len = 10'(dl);
    n_cpa_go = 0; n_sta_go = 0; n_clear = 0;
    pulse(activity);
    check(!start_cpa, "no CPA before the first gain adjustment");
    pulse(gain_adj);
    check(start_cpa && n_cpa_go == 1, "CPA starts at the first gain adjustment");
    pulse(phase_adj);
    check(!start_sta, "STA not armed after one phase adjustment");
    pulse(gain_adj);
    pulse(phase_adj);
    check(start_sta && n_sta_go == 1, "STA armed at the second phase adjustment");
    pulse(gain_adj); pulse(phase_adj);
    check(n_cpa_go == 1 && n_sta_go == 1, "one start each");
    pulse(toggle);
    if (with_skip) pulse(skip);
    load_at = -1; n_data = 0;
    for (int k = 0; k < 60; k++) begin
      @(negedge clk); sym_tick = 1;
      #0.5;
      if (ft_load) load_at = k;
      @(negedge clk); sym_tick = 0;
      if (data_en) n_data++;
      if (k == load_at + 1 && load_at >= 0) check(fine_active, "fine_active after the first data tick");
      repeat (5) @(negedge clk);
    end
    check(load_at == (with_skip ? 13 : 14), $sformatf("ft_load on tick %0d", load_at));
    check(ft_enable && fine_active && !data_en, "tracking on, data finished");
    check(n_data == dl, $sformatf("data_en for %0d ticks, expected %0d", n_data, dl));
    pulse(burst_end);
    check(n_clear == 1 && !start_cpa && !start_sta && !ft_enable && !fine_active && !toggled, "burst end clears");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 20); run(1, 30); run(0, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
