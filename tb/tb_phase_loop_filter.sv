// tb_phase_loop_filter: coarse mode must give -49*err at once; fine mode is
// checked against a proportional-plus-integral model (gain 13/8 and an
// integrator of 1/64 per error, floor rounding) kept here in integers, over
// random errors and a constant error that must make the output ramp. Also
// checks `clear` of the integrator and the one-clock latency.
`timescale 1ns/1ps
module tb_phase_loop_filter;
  import qam_rx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic clear = 0, err_valid = 0, is_fine = 0;
  logic signed [LERR_W-1:0] err = '0;
  phase_t upd;
  logic upd_valid;
  int checks = 0, failures = 0;

  phase_loop_filter dut (.*);

  function automatic int fdiv(input int a, input int d);   // floor division
    return (a >= 0) ? a / d : -((-a + d - 1) / d);
  endfunction

  longint integ = 0;
  task automatic apply(input int e, input bit fine);
    int expv;
    @(negedge clk);
    err = LERR_W'(e); is_fine = fine; err_valid = 1;
    @(negedge clk);
    err_valid = 0;
    if (fine) begin
      integ += e;
      expv = -(fdiv(13 * e, 8) + fdiv(int'(integ), 64));
    end else expv = -49 * e;
    checks++;
    if (!upd_valid || upd != phase_t'(expv)) begin
      failures++;
      $display("FAIL: err=%0d fine=%b upd=%0d expected %0d", e, fine, $signed(upd), expv);
    end
  endtask

  initial begin
    phase_t u0, u1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) apply($urandom_range(0, 1023) - 512, 0);
    for (int n = 0; n < 200; n++) apply($urandom_range(0, 1023) - 512, 1);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0; integ = 0;
    apply(40, 1); u0 = upd;
    for (int n = 0; n < 20; n++) apply(40, 1);
    u1 = upd;
    checks++;
    if (!($signed(u1) < $signed(u0))) begin failures++; $display("FAIL: integrator does not ramp"); end
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
