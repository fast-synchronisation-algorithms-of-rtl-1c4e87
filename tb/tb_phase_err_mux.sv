// tb_phase_err_mux: random coarse and fine errors and strobes under a random
// select; checks after one clock that the selected error is passed
// sign-extended with its strobe and mode, and that the other is dropped.
`timescale 1ns/1ps
module tb_phase_err_mux;
  import qam_rx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic sel_fine = 0, coarse_valid = 0, fine_valid = 0;
  logic signed [CERR_W-1:0] coarse_err = '0;
  logic signed [FERR_W-1:0] fine_err = '0;
  logic signed [LERR_W-1:0] err;
  logic err_valid, is_fine;
  int checks = 0, failures = 0;

  phase_err_mux dut (.*);

  initial begin
    int ce, fe;
    bit s, cv, fv;
    logic signed [LERR_W-1:0] last = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      s = $urandom_range(0, 1); cv = $urandom_range(0, 1); fv = $urandom_range(0, 1);
      ce = $urandom_range(0, 1023) - 512; fe = $urandom_range(0, 2047) - 1024;
      sel_fine = s; coarse_valid = cv; fine_valid = fv;
      coarse_err = CERR_W'(ce); fine_err = FERR_W'(fe);
      @(negedge clk);
      coarse_valid = 0; fine_valid = 0;
      checks++;
      if (err_valid != (s ? fv : cv) || is_fine != s ||
          (err_valid && int'(err) != (s ? fe : ce)) || (!err_valid && err != last)) begin
        failures++;
        $display("FAIL: sel=%b cv=%b fv=%b ce=%0d fe=%0d -> err=%0d valid=%b", s, cv, fv, ce, fe, err, err_valid);
      end
      last = err;
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
