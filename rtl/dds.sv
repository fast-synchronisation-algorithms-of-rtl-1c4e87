// dds: direct digital synthesiser used as the carrier local oscillator.
//
// A phase accumulator advances by FREQ_WORD every master clock. The 16-bit
// phase offset register is added to its top bits; the carrier loop moves the
// local oscillator phase by adding its updates (`upd`, modulo 2^16) to this
// register. The top 8 bits of the summed phase address a 64-entry
// quarter-wave table, mirrored and negated per quadrant, giving 10-bit sine
// and cosine words for the D/A stage. The table holds
// round(511 * sin((k + 0.5) * pi/128)), k = 0..63, filled at elaboration from
// a Taylor series in integer arithmetic.
//
// With the 86.4 MHz master clock the default FREQ_WORD puts the fundamental
// at 42.9 MHz, so that its image (86.4 - 42.9 = 43.5 MHz) falls on the IF;
// the D/A converter and image filter are outside this block. The image
// carries the negated phase, which the carrier loop absorbs in its sign.
//
// Outputs are registered (one clock from phase to sin_out/cos_out);
// `phase_offset` shows the register. That the local oscillator is a DDS with
// an image-frequency output whose phase offset the loop updates follows the
// published receiver; clocking, widths and table size are this design's.
module dds
  import qam_rx_pkg::*;
#(
  parameter int ACC_W     = 24,
  parameter int FREQ_WORD = 8330354
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear_offset,
  input  phase_t                  upd,
  input  logic                    upd_valid,
  output phase_t                  phase_offset,
  output logic signed [FIR_W-1:0] sin_out,
  output logic signed [FIR_W-1:0] cos_out
);

  localparam int TBL = 64;

  // sin(x) for x in Q30 radians, 0 <= x <= pi/2, result in Q30.
  function automatic longint sin_q30(input longint x);
    longint x2, term, sum;
    x2   = (x * x) >>> 30;
    term = x;
    sum  = x;
    for (int n = 1; n <= 7; n++) begin
      term = -(((term * x2) >>> 30) / longint'((2 * n) * (2 * n + 1)));
      sum  = sum + term;
    end
    return sum;
  endfunction

  // pi/128 in Q30
  localparam longint PI_128_Q30 = 64'd26353589;

  function automatic logic [TBL*9-1:0] build_table();
    logic [TBL*9-1:0] t;
    longint s;
    for (int k = 0; k < TBL; k++) begin
      s = sin_q30((longint'(2 * k + 1) * PI_128_Q30) >>> 1);
      t[k*9 +: 9] = 9'((s * 511 + (longint'(1) << 29)) >>> 30);
    end
    return t;
  endfunction

  localparam logic [TBL*9-1:0] QUARTER = build_table();

  logic [ACC_W-1:0] acc;
  phase_t           ph;

  function automatic logic signed [FIR_W-1:0] wave(input logic [7:0] p);
    logic [5:0] idx;
    logic [8:0] mag;
    idx = p[6] ? ~p[5:0] : p[5:0];
    mag = QUARTER[idx*9 +: 9];
    return p[7] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  endfunction

  assign ph = acc[ACC_W-1 -: PH_W] + phase_offset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc          <= '0;
      phase_offset <= '0;
      sin_out      <= '0;
      cos_out      <= '0;
    end else begin
      acc <= acc + ACC_W'(FREQ_WORD);
      if (clear_offset)   phase_offset <= '0;
      else if (upd_valid) phase_offset <= phase_offset + upd;
      sin_out <= wave(ph[PH_W-1 -: 8]);
      cos_out <= wave(ph[PH_W-1 -: 8] + 8'd64);
    end
  end

endmodule
