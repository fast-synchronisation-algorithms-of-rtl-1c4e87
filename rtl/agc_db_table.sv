// agc_db_table: translates a measured amplitude into a gain correction in dB.
//
// The AGC compares the CORDIC magnitude of the preamble with the wanted level
// TARGET_MAG and asks the variable gain amplifier for the difference, in
// steps of 0.5 dB:
//     corr = round( 2 * 20 * log10(TARGET_MAG / mag) ),  clipped to +-63.
// The table has one entry per magnitude 0..511 (larger magnitudes read entry
// 511, magnitude 0 reads the largest correction) and is filled at elaboration
// by an integer log2 routine, so no real arithmetic reaches the hardware.
// The lookup is combinational.
//
// That the amplitude is turned into a dB control word by a table, and the
// 0.5 dB gain step, follow the published receiver; the table content and the
// target level (a preamble corner at (80,80) A/D units, times the CORDIC gain)
// are this implementation's choice.
module agc_db_table
  import qam_rx_pkg::*;
#(
  parameter int TARGET_MAG = 186
) (
  input  mag_t              mag,
  output logic signed [7:0] corr
);

  localparam int ENTRIES = 512;
  localparam longint MAXC = 63;

  // log2(x) in Q16, x >= 1, by normalising and repeated squaring.
  function automatic longint log2_q16(input longint x);
    longint m, r;
    int     e;
    e = 0;
    while ((x >> (e + 1)) != 0) e++;
    m = (x << 30) >> e;           // mantissa in [1,2) as Q30
    r = longint'(e) << 16;
    for (int b = 15; b >= 0; b--) begin
      m = (m * m) >> 30;
      if (m >= (longint'(2) << 30)) begin
        m = m >> 1;
        r = r + (longint'(1) << b);
      end
    end
    return r;
  endfunction

  // 40 * log10(2) in Q16 = 12.0412 * 65536.
  localparam longint K_Q16 = 789132;

  function automatic logic signed [7:0] entry(input int m);
    longint d, v;
    if (m == 0) return 8'(MAXC);
    d = log2_q16(longint'(TARGET_MAG)) - log2_q16(longint'(m));  // Q16
    v = d * K_Q16;                                               // Q32
    v = (v >= 0) ? ((v + (longint'(1) << 31)) >>> 32)
                 : -((-v + (longint'(1) << 31)) >>> 32);
    if (v > MAXC)  v = MAXC;
    if (v < -MAXC) v = -MAXC;
    return 8'(v);
  endfunction

  function automatic logic [ENTRIES*8-1:0] build_table();
    logic [ENTRIES*8-1:0] t;
    for (int m = 0; m < ENTRIES; m++) t[m*8 +: 8] = entry(m);
    return t;
  endfunction

  localparam logic [ENTRIES*8-1:0] TABLE = build_table();

  logic [8:0] idx;
  assign idx  = (mag >= MAG_W'(ENTRIES)) ? 9'(ENTRIES - 1) : mag[8:0];
  assign corr = TABLE[idx*8 +: 8];

endmodule
