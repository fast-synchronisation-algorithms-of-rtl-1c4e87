// tb_coarse_phase_est: feeds a preamble corner rotated by a known phase,
// A*(cos(45deg+phi), sin(45deg+phi)) in any of the four corners, and checks
// that after `start` exactly three errors come out, each the mean of two
// samples of (|I|-|Q|)*sgn(I)*sgn(Q) computed here from the sample values,
// at the expected sample positions; that its sign opposes phi; and that
// nothing comes out before `start` or after the third.
`timescale 1ns/1ps
module tb_coarse_phase_est;
  import qam_rx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic clear = 0, start = 0, in_valid = 0;
  adc_t i_in = '0, q_in = '0;
  logic signed [CERR_W-1:0] err;
  logic err_valid, done;
  logic [1:0] n_upd;
  int checks = 0, failures = 0;

  coarse_phase_est dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int sample_no = 0;
  int outs [$];
  int out_pos [$];
  always @(posedge clk) if (err_valid) begin outs.push_back(int'(err)); out_pos.push_back(sample_no); end

  function automatic int eps(input int i, input int q);
    int d = ((i < 0) ? -i : i) - ((q < 0) ? -q : q);
    return ((i < 0) != (q < 0)) ? -d : d;
  endfunction

  task automatic run(input real phi_deg, input int corner);
    real a, ph;
    int  i, q, e;
    outs.delete(); out_pos.delete();
    a  = 113.0;
    ph = (45.0 + 90.0 * corner + phi_deg) * 3.14159265 / 180.0;
    i  = $rtoi(a * $cos(ph) + ((a * $cos(ph) >= 0) ? 0.5 : -0.5));
    q  = $rtoi(a * $sin(ph) + ((a * $sin(ph) >= 0) ? 0.5 : -0.5));
    // two samples with the value, before start: nothing may come out
    for (int k = 0; k < 4; k++) begin
      repeat (15) @(negedge clk);
      i_in = adc_t'(i); q_in = adc_t'(q); in_valid = 1;
      @(negedge clk); in_valid = 0; sample_no++;
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    sample_no = 0;
    for (int k = 0; k < 16; k++) begin
      repeat (15) @(negedge clk);
      i_in = adc_t'(i); q_in = adc_t'(q); in_valid = 1;
      @(negedge clk); in_valid = 0; sample_no++;
    end
    e = eps(i, q);
    check(outs.size() == 3, $sformatf("phi=%0.1f: %0d errors", phi_deg, outs.size()));
    check(done && n_upd == 3, "done after three adjustments");
    foreach (outs[k]) begin
      check(outs[k] == e, $sformatf("phi=%0.1f corner %0d: err %0d expected %0d", phi_deg, corner, outs[k], e));
      check(out_pos[k] == 4 * k + 4, $sformatf("error %0d after sample %0d", k, out_pos[k]));
    end
    if (phi_deg > 1.0) check(e < 0, "positive phase gives negative error");
    if (phi_deg < -1.0) check(e > 0, "negative phase gives positive error");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(10.0, 0); run(-20.0, 1); run(30.0, 2); run(-5.0, 3); run(0.0, 0); run(44.0, 2);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(!done && n_upd == 0, "clear resets the sequence");
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
