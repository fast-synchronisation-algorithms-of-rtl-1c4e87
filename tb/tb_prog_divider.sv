// tb_prog_divider: records the clock of every strobe and checks the spacing
// of 16 clocks (2 per 32-clock symbol) with alternating centre flag; then
// applies corrections at a known clock and checks the next strobe against
// the time computed here: last strobe + 16 + adj when that is still ahead
// (centre sample follows), one sample later when it has passed (skip pulse,
// half-symbol sample follows), for corrections over the whole range.
`timescale 1ns/1ps
module tb_prog_divider;
  import qam_rx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic adj_valid = 0;
  logic signed [5:0] adj = '0;
  logic sample, center, skip;
  int checks = 0, failures = 0;

  prog_divider dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint tick = 0;
  always @(posedge clk) tick <= tick + 1;
  longint last_t = -1;
  bit     last_c;
  int     n_skip = 0;
  longint st [$];
  bit     sc [$];
  always @(posedge clk) if (rst_n) begin
    if (sample) begin st.push_back(tick); sc.push_back(center); last_t = tick; last_c = center; end
    if (skip) n_skip++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (200) @(posedge clk);
    for (int k = 1; k < st.size(); k++) begin
      check(st[k] - st[k-1] == 16, $sformatf("strobe spacing %0d", st[k] - st[k-1]));
      check(sc[k] != sc[k-1], "centre flag alternates");
    end
    for (int a = -16; a <= 16; a += 3) begin
      for (int d = 3; d <= 12; d += 9) begin
        longint ta, target, first;
        int     sk0;
        // wait for a strobe, then d clocks, then correct
        @(posedge clk iff sample);
        ta = tick;
        repeat (d - 1) @(posedge clk);
        @(negedge clk);
        adj = 6'(a); adj_valid = 1; sk0 = n_skip;
        @(negedge clk);
        adj_valid = 0;
        st.delete(); sc.delete();
        repeat (60) @(posedge clk);
        // strobes are seen one clock after the divider's counter event
        target = ta + 16 + a;
        first  = (target > ta + d) ? target : target + 16;
        check(st.size() >= 2 && st[0] == first && st[1] == first + 16,
              $sformatf("adj=%0d after %0d clocks: strobe at +%0d, expected +%0d", a, d, st[0] - ta, first - ta));
        check(sc[0] == (target > ta + d) && sc[1] != sc[0], $sformatf("adj=%0d: centre flag after correction", a));
        check((n_skip - sk0) == ((target > ta + d) ? 0 : 1), $sformatf("adj=%0d: skip pulse", a));
      end
    end
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
