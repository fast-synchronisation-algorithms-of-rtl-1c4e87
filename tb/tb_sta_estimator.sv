// tb_sta_estimator: feeds sample pairs on a straight line through zero at a
// known fraction f of the half-symbol interval (I'1 = A*f, I'2 = -A*(1-f),
// both signs of slope) and checks t_m against floor(64*f) (+-1 for
// quantisation of the samples), the correction round((t_m - t_s)/4), the
// P_STEPS+1 clock latency from the second sample, that samples before `arm`,
// pairs of one sign and small swings do not trigger, and one-shot operation.
`timescale 1ns/1ps
module tb_sta_estimator;
  import qam_rx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic clear = 0, arm = 0, in_valid = 0;
  adc_t i_in = '0;
  logic [TS_W-1:0] ts = '0;
  logic toggle, adj_valid;
  logic [TS_W-1:0] tm;
  logic signed [5:0] adj;
  int checks = 0, failures = 0;

  sta_estimator dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint tick = 0, t_tog = 0;
  int n_tog = 0;
  always @(posedge clk) begin
    tick <= tick + 1;
    if (toggle) begin n_tog++; t_tog = tick; end
  end

  longint t_second;
  task automatic smp(input int v);
    repeat (15) @(negedge clk);
    i_in = adc_t'(v); in_valid = 1;
    @(negedge clk); in_valid = 0;
    t_second = tick - 1;
  endtask

  task automatic run(input real f, input int amp, input int tsv);
    int a, b, e, expadj;
    a = $rtoi(real'(amp) * f + 0.5);
    b = -$rtoi(real'(amp) * (1.0 - f) + 0.5);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    ts = 6'(tsv);
    smp(a); smp(a);                 // before arm: ignored
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    n_tog = 0;
    smp(a); smp(a); smp(a); smp(b);
    repeat (20) @(negedge clk);
    e = $rtoi(64.0 * real'(a) / real'(a - b));
    check(n_tog == 1, $sformatf("f=%0.3f: %0d toggles", f, n_tog));
    check(int'(tm) - e <= 1 && e - int'(tm) <= 1, $sformatf("f=%0.3f: t_m=%0d expected %0d", f, tm, e));
    expadj = int'(tm) - tsv;
    expadj = (expadj + 2 >= 0) ? (expadj + 2) / 4 : -((-(expadj + 2) + 3) / 4);
    check(int'(adj) == expadj, $sformatf("f=%0.3f ts=%0d: adj=%0d expected %0d", f, tsv, adj, expadj));
    check(t_tog - t_second == 6 + 1, $sformatf("latency %0d clocks", t_tog - t_second));
    smp(-a); smp(a);
    repeat (20) @(negedge clk);
    check(n_tog == 1, "one shot until clear");
    // falling the other way: -A*f then +A*(1-f)
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    n_tog = 0;
    smp(-a); smp(-b);
    repeat (20) @(negedge clk);
    check(n_tog == 1 && int'(tm) - e <= 1 && e - int'(tm) <= 1, $sformatf("rising edge f=%0.3f: t_m=%0d", f, tm));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0.5, 120, 32); run(0.25, 120, 63); run(0.8, 100, 10); run(0.1, 127, 60);
    run(0.95, 127, 0); run(0.6, 90, 45);
    // small swing and same sign never trigger
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    n_tog = 0;
    smp(10); smp(-10); smp(5); smp(-5); smp(-60); smp(-50);
    repeat (20) @(negedge clk);
    check(n_tog == 0, "small swing or one sign does not trigger");
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
