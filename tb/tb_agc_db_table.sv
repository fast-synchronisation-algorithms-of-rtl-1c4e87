// tb_agc_db_table: checks every table entry against
// round(40*log10(186/mag)) computed in real arithmetic, clipped to +-63
// (one count of slack for values that fall on a rounding boundary), and the
// entries for magnitude 0 and for magnitudes past the table.
`timescale 1ns/1ps
module tb_agc_db_table;
  import qam_rx_pkg::*;
  mag_t mag;
  logic signed [7:0] corr;
  int checks = 0, failures = 0;

  agc_db_table dut (.*);

  initial begin
    real r;
    int  e;
    for (int m = 0; m < 1024; m++) begin
      mag = mag_t'(m);
      #1;
      if (m == 0) e = 63;
      else begin
        r = 40.0 * $log10(186.0 / real'((m > 511) ? 511 : m));
        e = $rtoi(r + ((r >= 0) ? 0.5 : -0.5));
        if (e > 63) e = 63;
        if (e < -63) e = -63;
      end
      checks++;
      if (int'(corr) - e > 1 || e - int'(corr) > 1) begin
        failures++;
        $display("FAIL: mag=%0d corr=%0d expected %0d", m, corr, e);
      end
    end
    mag = 10'd186; #1;
    checks++;
    if (corr != 0) begin failures++; $display("FAIL: target gives %0d", corr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
