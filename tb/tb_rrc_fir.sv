// tb_rrc_fir: the impulse response must match 128*c[n]/256 with c the
// root raised cosine coefficients (roll-off 0.33, 17 taps at two samples per
// symbol, scaled to a sum of 1024) computed here in real arithmetic (+-2);
// a constant input of 80 must give 319; an input matched to the signs of the
// coefficients must saturate at +-511; and the output follows each input
// strobe by one clock.
`timescale 1ns/1ps
module tb_rrc_fir;
  import qam_rx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0, out_valid;
  adc_t x = '0;
  fir_t y;
  int checks = 0, failures = 0;

  rrc_fir dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam real PI = 3.14159265358979;
  function automatic real rrc(input real t);
    real b = 0.33;
    if (t < 1e-9 && t > -1e-9) return 1.0 - b + 4.0 * b / PI;
    return ($sin(PI*t*(1.0-b)) + 4.0*b*t*$cos(PI*t*(1.0+b))) / (PI*t*(1.0 - (4.0*b*t)**2));
  endfunction

  task automatic push(input int v);
    @(negedge clk); x = adc_t'(v); in_valid = 1;
    @(negedge clk); in_valid = 0;
    check(out_valid, "output one clock after input");
    repeat (3) @(negedge clk);
  endtask

  initial begin
    real h [17], s;
    repeat (3) @(posedge clk);
    rst_n = 1;
    s = 0.0;
    for (int n = 0; n < 17; n++) begin h[n] = rrc(real'(n - 8) / 2.0); s += h[n]; end
    push(127);
    for (int n = 0; n < 17; n++) begin
      real e;
      e = 127.0 * 1024.0 * h[n] / s / 256.0;
      if (n > 0) push(0);
      check(real'(y) - e < 2.0 && e - real'(y) < 2.0, $sformatf("impulse tap %0d: %0d expected %0.1f", n, y, e));
    end
    for (int n = 0; n < 17; n++) push(80);
    check(y == 319, $sformatf("DC response %0d", y));
    for (int n = 0; n < 17; n++) push((h[16-n] >= 0) ? 127 : -128);
    check(y == 511, $sformatf("positive saturation %0d", y));
    for (int n = 0; n < 17; n++) push((h[16-n] >= 0) ? -128 : 127);
    check(y == -511, $sformatf("negative saturation %0d", y));
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
