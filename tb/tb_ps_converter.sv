// tb_ps_converter: loads a random 4-bit word every 32 clocks and checks that
// exactly four bits come out, most significant first, the first one clock
// after the load (seen here two clocks after the input strobe) and then
// every 8 clocks; `clear` drops what is left.
`timescale 1ns/1ps
module tb_ps_converter;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic clear = 0, in_valid = 0, bit_valid, bit_out;
  logic [3:0] bits = '0;
  int checks = 0, failures = 0;

  ps_converter dut (.*);

  longint tick = 0;
  always @(posedge clk) tick <= tick + 1;
  bit     got [$];
  longint gt  [$];
  always @(posedge clk) if (bit_valid) begin got.push_back(bit_out); gt.push_back(tick); end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      int w;
      longint tl;
      w = $urandom_range(0, 15);
      got.delete(); gt.delete();
      @(negedge clk); bits = 4'(w); in_valid = 1; tl = tick;
      @(negedge clk); in_valid = 0;
      repeat (30) @(negedge clk);
      checks++;
      if (got.size() != 4 || got[0] != w[3] || got[1] != w[2] || got[2] != w[1] || got[3] != w[0] ||
          gt[0] != tl + 2 || gt[1] != tl + 10 || gt[2] != tl + 18 || gt[3] != tl + 26) begin
        failures++;
        $display("FAIL: word %h: %0d bits", w, got.size());
      end
    end
    got.delete();
    @(negedge clk); bits = 4'hF; in_valid = 1;
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (got.size() != 2) begin failures++; $display("FAIL: clear left %0d bits", got.size()); end
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
