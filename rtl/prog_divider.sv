// prog_divider: programmable divider that clocks the A/D converters.
//
// The master clock runs at R_OVS = 32 times the symbol rate, so the divider
// produces one A/D sample strobe every R_OVS/2 = 16 ticks (two samples per
// symbol) and can place the sampling moment on any of the 32 sub-intervals
// of a symbol. A count-down counter holds the ticks left to the next strobe.
// A timing correction `adj` (signed, master ticks, positive = later) moves
// the next strobe: the counter is shifted by `adj` at once. If the shifted
// strobe time has already passed, that sample is skipped and the one after it
// is taken, so the sample grid moves by exactly `adj` with no duplicated
// sample; `skip` pulses when that happens (the skipped sample is always a
// symbol-centre sample).
//
// `center` qualifies each strobe: 1 for a symbol-centre sample, 0 for the
// sample half a symbol later. The correction comes from the preamble
// transition, where the sample before the transition is a centre sample;
// the first strobe after a correction that is not skipped is therefore a
// centre sample, and parity alternates from there.
//
// Outputs are registered pulses. The divider and its 32x master clock follow
// the published receiver; the immediate application of the correction and the
// parity rule are this design's.
module prog_divider
  import qam_rx_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adj_valid,
  input  logic signed [5:0] adj,
  output logic              sample,
  output logic              center,
  output logic              skip
);

  logic [4:0]        cnt;   // ticks left to the next strobe, minus one
  logic              par;   // upcoming strobe is a centre sample
  logic signed [6:0] shifted;

  // ticks left minus one after this clock, with the correction applied
  assign shifted = $signed({2'b00, cnt}) + 7'(adj) - 7'sd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= 5'(HALF - 1);
      par    <= 1'b1;
      sample <= 1'b0;
      center <= 1'b0;
      skip   <= 1'b0;
    end else begin
      sample <= 1'b0;
      skip   <= 1'b0;
      if (adj_valid) begin
        if (shifted == -7'sd1) begin
          sample <= 1'b1;
          center <= 1'b1;
          par    <= 1'b0;
          cnt    <= 5'(HALF - 1);
        end else if (shifted < 0) begin
          cnt  <= 5'(shifted + 7'(HALF));
          par  <= 1'b0;
          skip <= 1'b1;
        end else begin
          cnt <= 5'(shifted);
          par <= 1'b1;
        end
      end else if (cnt == 0) begin
        sample <= 1'b1;
        center <= par;
        par    <= ~par;
        cnt    <= 5'(HALF - 1);
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

endmodule
