// tb_dds: checks the sine and cosine words against 511*sin(2*pi*(k+0.5)/256)
// computed in real arithmetic for the top 8 bits k of the phase expected
// from the accumulator model (n*FREQ_WORD) plus the offset (+-1 LSB), for
// many clocks; checks that offset updates add modulo 2^16 and that
// clear_offset zeroes the register.
`timescale 1ns/1ps
module tb_dds;
  import qam_rx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic clear_offset = 0, upd_valid = 0;
  phase_t upd = '0, phase_offset;
  logic signed [FIR_W-1:0] sin_out, cos_out;
  int checks = 0, failures = 0;

  dds dut (.*);

  longint n = 0;         // accumulator steps taken
  longint off = 0;
  always @(posedge clk) if (rst_n) n <= n + 1;

  task automatic check_out();
    longint acc;
    int     k, es, ec;
    // sin_out at this point was formed from the phase one clock earlier
    acc = ((n - 1) * 8330354) % (longint'(1) << 24);
    k   = int'((((acc >> 8) + off) % 65536) >> 8);
    es  = $rtoi(511.0 * $sin(2.0 * 3.14159265358979 * (real'(k) + 0.5) / 256.0) + 1000.5) - 1000;
    ec  = $rtoi(511.0 * $cos(2.0 * 3.14159265358979 * (real'(k) + 0.5) / 256.0) + 1000.5) - 1000;
    checks++;
    if (int'(sin_out) - es > 1 || es - int'(sin_out) > 1 || int'(cos_out) - ec > 1 || ec - int'(cos_out) > 1) begin
      failures++;
      $display("FAIL: k=%0d sin=%0d cos=%0d expected %0d %0d", k, sin_out, cos_out, es, ec);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int j = 0; j < 300; j++) begin @(negedge clk); check_out(); end
    for (int j = 0; j < 50; j++) begin
      int u;
      u = $urandom_range(0, 65535);
      @(negedge clk); upd = phase_t'(u); upd_valid = 1;
      @(negedge clk); upd_valid = 0; off = (off + u) % 65536;
      checks++;
      if (phase_offset != phase_t'(off)) begin failures++; $display("FAIL: offset %0d expected %0d", phase_offset, off); end
      @(negedge clk); check_out();
      @(negedge clk); check_out();
    end
    @(negedge clk); clear_offset = 1; @(negedge clk); clear_offset = 0; off = 0;
    checks++;
    if (phase_offset != 0) begin failures++; $display("FAIL: clear_offset"); end
    @(negedge clk); @(negedge clk); check_out();
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
