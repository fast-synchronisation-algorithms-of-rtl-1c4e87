// tb_agc_bed: drives the AGC with a modelled amplifier: the magnitude seen is
// level * 10^(0.5*gain/20) while a burst is on and 2 between bursts, one
// sample every 16 clocks. For bursts at several levels it checks the activity
// pulse, exactly three gain adjustments, the final gain against the ideal
// 40*log10(186/level) steps (+-2 steps = +-1 dB), that dips of a data burst
// above the end threshold do not end it, that the burst end comes exactly
// EOB_COUNT samples after the signal drops (the pulse is seen one clock
// after the tenth low sample), and that the gain is back at 0. With agc_en
// low a burst must still give activity, three gain_adj pulses and its end,
// while the gain word stays at 0.
`timescale 1ns/1ps
module tb_agc_bed;
  import qam_rx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic clear = 0, mag_valid = 0, agc_en = 1;
  mag_t mag = '0;
  logic activity, gain_adj, agc_done, burst_end;
  gain_t gain;
  int checks = 0, failures = 0;

  agc_bed dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real level = 0.0;
  bit  on = 0;
  int  n_act = 0, n_adj = 0, n_end = 0, sample_no = 0, end_sample = -1;

  always @(posedge clk) begin
    if (activity) n_act++;
    if (gain_adj) n_adj++;
    if (burst_end) begin n_end++; end_sample = sample_no; end
  end

  task automatic samples(input int n, input real dip);
    for (int k = 0; k < n; k++) begin
      real v;
      repeat (15) @(negedge clk);
      v = on ? level * (10.0 ** (0.5 * real'(gain) / 20.0)) : 2.0;
      if (on && dip > 0.0 && (k % 3) == 1) v = dip;
      mag = mag_t'($rtoi((v > 1000.0) ? 1000.0 : v));
      mag_valid = 1;
      @(negedge clk);
      mag_valid = 0;
      sample_no++;
    end
  endtask

  task automatic burst(input real lvl);
    int e, off;
    level = lvl; n_act = 0; n_adj = 0; n_end = 0;
    on = 1;
    samples(20, 0.0);
    e = $rtoi(40.0 * $log10(186.0 / lvl) + 0.5);
    check(n_act == 1, $sformatf("level %0.1f: %0d activity pulses", lvl, n_act));
    check(n_adj == 3, $sformatf("level %0.1f: %0d gain adjustments", lvl, n_adj));
    check(agc_done, "agc_done after the iterations");
    check(int'(gain) - e <= 2 && e - int'(gain) <= 2,
          $sformatf("level %0.1f: gain %0d, ideal %0d", lvl, gain, e));
    samples(30, 40.0);
    check(n_end == 0, "dips above the end threshold do not end the burst");
    on = 0;
    off = sample_no;
    samples(14, 0.0);
    check(n_end == 1 && end_sample == off + 10,
          $sformatf("burst end after %0d samples", end_sample - off));
    check(gain == 0 && !agc_done, "gain back to minimum after the burst");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    samples(10, 0.0);
    check(n_act == 0 && gain == 0, "no activity on noise");
    burst(186.0); burst(33.0); burst(80.0); burst(120.0);
    // gain frozen
    agc_en = 0; level = 60.0; n_act = 0; n_adj = 0; n_end = 0; on = 1;
    samples(20, 0.0);
    check(n_act == 1 && n_adj == 3 && agc_done, "AGC off: sequence still runs");
    check(gain == 0, $sformatf("AGC off: gain %0d, expected 0", gain));
    on = 0; samples(14, 0.0);
    check(n_end == 1 && !agc_done, "AGC off: burst end detected");
    agc_en = 1;
    // abort by clear
    level = 50.0; on = 1; samples(8, 0.0);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(gain == 0 && !agc_done, "clear returns the gain to minimum");
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
