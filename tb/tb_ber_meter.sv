// tb_ber_meter: sends the PRBS-9 sequence x[n] = x[n-9] xor x[n-5] (first
// nine bits one), generated here, with errors flipped in at known places,
// over two bursts with `restart` between them, and checks the bit and error
// counts after every bit; a pattern started at the wrong place must show
// about half errors.
`timescale 1ns/1ps
module tb_ber_meter;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic restart = 0, bit_valid = 0, bit_in = 0;
  logic [31:0] bits, errors;
  int checks = 0, failures = 0;

  ber_meter dut (.*);

  bit x [2000];
  int exp_bits = 0, exp_errs = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input int start, input int n, input int err_every);
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      bit_in = x[start + k] ^ ((err_every > 0 && (k % err_every) == 7) ? 1'b1 : 1'b0);
      bit_valid = 1;
      @(negedge clk); bit_valid = 0;
      exp_bits++;
      if (err_every > 0 && (k % err_every) == 7) exp_errs++;
      @(negedge clk);
      if (start == 0)
        check(bits == 32'(exp_bits) && errors == 32'(exp_errs),
              $sformatf("bit %0d: counters %0d/%0d, expected %0d/%0d", k, bits, errors, exp_bits, exp_errs));
    end
  endtask

  initial begin
    for (int n = 0; n < 9; n++) x[n] = 1;
    for (int n = 9; n < 2000; n++) x[n] = x[n-9] ^ x[n-5];
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(0, 1000, 0);
    check(bits == 1000 && errors == 0, $sformatf("clean burst: %0d bits %0d errors", bits, errors));
    send(0, 500, 50);
    check(bits == 1500 && errors == 10, $sformatf("burst with 10 errors: %0d bits %0d errors", bits, errors));
    send(3, 400, 0);
    check(errors > 10 + 150 && errors < 10 + 250, $sformatf("misaligned pattern: %0d errors", errors - 10));
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
