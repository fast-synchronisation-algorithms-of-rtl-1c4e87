// tb_decision_fine_est: loads the norms from a corner at (320,320), then
// sends random 16QAM symbols (levels 1 and 3 of 107 each) with small noise
// and checks every decision; sends corners whose amplitude moves to 290 and
// checks that I_norm/Q_norm follow a real-valued 7/8-1/8 recursion (+-3);
// checks the fine error on corners against
// ((|I|-I_norm)-(|Q|-Q_norm))*sgn(I)*sgn(Q) with the norms of that model,
// its sign for a rotated constellation, that inner and mixed points give no
// fine error, and that nothing is decided without data_en.
`timescale 1ns/1ps
module tb_decision_fine_est;
  import qam_rx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic clear = 0, load = 0, data_en = 0, sym_valid = 0;
  fir_t i_in = '0, q_in = '0;
  logic dec_valid, ref_valid, ferr_valid;
  qam_sym_t dec;
  logic signed [FERR_W-1:0] ferr;
  logic [FIR_W-1:0] i_norm, q_norm;
  int checks = 0, failures = 0;

  decision_fine_est dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real mi, mq;   // model norms

  task automatic sym(input int i, input int q, output bit dv, output bit fv);
    @(negedge clk);
    i_in = fir_t'(i); q_in = fir_t'(q); sym_valid = 1;
    @(negedge clk);
    sym_valid = 0;
    dv = dec_valid; fv = ferr_valid;
  endtask

  initial begin
    bit dv, fv;
    int lv [4] = '{-3, -1, 1, 3};
    repeat (3) @(posedge clk);
    rst_n = 1;
    sym(300, 300, dv, fv);
    check(!dv && !fv, "no decision without data_en");
    @(negedge clk); load = 1; data_en = 1;
    sym(-320, -320, dv, fv);
    load = 0;
    check(ref_valid && dec.si && dec.sq && i_norm == 320 && q_norm == 320, "norms loaded from the preamble");
    mi = 320.0; mq = 320.0;
    for (int n = 0; n < 300; n++) begin
      int a, b, i, q;
      a = lv[$urandom_range(0, 3)];
      b = lv[$urandom_range(0, 3)];
      i = a * 107 + $urandom_range(0, 20) - 10;
      q = b * 107 + $urandom_range(0, 20) - 10;
      sym(i, q, dv, fv);
      check(dv && dec.si == (a < 0) && dec.sq == (b < 0) && dec.oi == (a == 3 || a == -3) &&
            dec.oq == (b == 3 || b == -3), $sformatf("decision of (%0d,%0d)", i, q));
      if ((a == 3 || a == -3) && (b == 3 || b == -3)) begin
        int e, ai, aq;
        ai = (i < 0) ? -i : i; aq = (q < 0) ? -q : q;
        e = $rtoi((real'(ai) - mi) - (real'(aq) - mq));
        if ((i < 0) != (q < 0)) e = -e;
        check(fv && int'(ferr) - e <= 3 && e - int'(ferr) <= 3,
              $sformatf("fine error %0d expected %0d", ferr, e));
        mi = 0.875 * mi + 0.125 * real'(ai);
        mq = 0.875 * mq + 0.125 * real'(aq);
      end else check(!fv, "no fine error on inner points");
    end
    // amplitude step of the corners
    for (int n = 0; n < 40; n++) begin
      sym(((n % 2) != 0) ? 290 : -290, ((n % 3) != 0) ? 290 : -290, dv, fv);
      mi = 0.875 * mi + 0.125 * 290.0;
      mq = 0.875 * mq + 0.125 * 290.0;
    end
    check(int'(i_norm) - $rtoi(mi) <= 3 && $rtoi(mi) - int'(i_norm) <= 3 &&
          int'(q_norm) - $rtoi(mq) <= 3 && $rtoi(mq) - int'(q_norm) <= 3,
          $sformatf("norms %0d/%0d follow the amplitude, model %0.1f", i_norm, q_norm, mi));
    // rotated corner: phase +10 degrees on the +I+Q corner
    sym($rtoi(410.0 * $cos(55.0 * 3.14159 / 180.0)), $rtoi(410.0 * $sin(55.0 * 3.14159 / 180.0)), dv, fv);
    check(fv && ferr < 0, "positive phase error gives negative fine error");
    sym(-$rtoi(410.0 * $cos(55.0 * 3.14159 / 180.0)), $rtoi(410.0 * $sin(55.0 * 3.14159 / 180.0)), dv, fv);
    check(fv && ferr > 0, "negative phase on the -I+Q corner gives positive fine error");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(i_norm == 0 && q_norm == 0, "clear");
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
