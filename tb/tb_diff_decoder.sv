// tb_diff_decoder: encodes random 4-bit words into 16QAM symbols with an
// encoder written here (quadrant advanced by the two MSBs, outer/inner flags
// from the two LSBs, swapped in odd quadrants), rotates the whole burst,
// reference symbol included, by 0, 90, 180 or 270 degrees, and checks that
// the decoder returns the original words one clock after each symbol.
`timescale 1ns/1ps
module tb_diff_decoder;
  import qam_rx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic clear = 0, load_ref = 0, in_valid = 0, out_valid;
  qam_sym_t ref_sym = '0, sym = '0;
  logic [3:0] bits;
  int checks = 0, failures = 0;

  diff_decoder dut (.*);

  // point (x, y) with x, y in {-3,-1,1,3}, rotated by r*90 degrees
  function automatic qam_sym_t to_sym(input int x, input int y, input int r);
    int t;
    for (int k = 0; k < r; k++) begin t = x; x = -y; y = t; end
    return '{si: x < 0, oi: (x == 3 || x == -3), sq: y < 0, oq: (y == 3 || y == -3)};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      int q;
      @(negedge clk); load_ref = 1; ref_sym = to_sym(-3, -3, r);
      @(negedge clk); load_ref = 0;
      q = 2;
      for (int n = 0; n < 200; n++) begin
        int w, mx, my, x, y;
        w  = $urandom_range(0, 15);
        q  = (q + (w >> 2)) % 4;
        mx = ((q % 2) == 0) ? ((w & 2) ? 3 : 1) : ((w & 1) ? 3 : 1);
        my = ((q % 2) == 0) ? ((w & 1) ? 3 : 1) : ((w & 2) ? 3 : 1);
        x  = (q == 1 || q == 2) ? -mx : mx;
        y  = (q == 2 || q == 3) ? -my : my;
        @(negedge clk); sym = to_sym(x, y, r); in_valid = 1;
        @(negedge clk); in_valid = 0;
        checks++;
        if (!out_valid || bits != 4'(w)) begin
          failures++;
          $display("FAIL: rotation %0d symbol %0d: bits %h expected %h", r, n, bits, w);
        end
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
