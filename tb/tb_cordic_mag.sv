// tb_cordic_mag: checks the CORDIC magnitude against K*sqrt(I^2+Q^2)
// computed in real arithmetic (K = 1.64248 for four rotations), for the four
// axes, the corners of the input range and random samples in all quadrants.
// Tolerance: 1 % (the residual angle of four rotations) plus 3 LSB of
// truncation. Also checks the one-clock latency.
`timescale 1ns/1ps
module tb_cordic_mag;
  import qam_rx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0, out_valid;
  adc_t i_in = '0, q_in = '0;
  mag_t mag;
  int checks = 0, failures = 0;

  cordic_mag dut (.*);

  task automatic one(input int i, input int q);
    real expv;
    @(negedge clk);
    i_in = adc_t'(i); q_in = adc_t'(q); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    expv = 1.64248 * $sqrt(real'(i*i + q*q));
    checks++;
    if (!out_valid || (real'(mag) - expv) > 0.01 * expv + 3.0 || (expv - real'(mag)) > 0.01 * expv + 3.0) begin
      failures++;
      $display("FAIL: I=%0d Q=%0d mag=%0d valid=%b expected %0.1f", i, q, mag, out_valid, expv);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(0, 0); one(100, 0); one(-100, 0); one(0, 100); one(0, -100);
    one(127, 127); one(-128, -128); one(-128, 127); one(127, -128); one(80, 80);
    for (int n = 0; n < 400; n++)
      one($urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
