// rrc_fir: root raised cosine data filter, roll-off 0.33, two samples per
// symbol.
//
// The receive half of the Nyquist filter pair: together with the transmit
// root raised cosine it gives a raised cosine response with (nearly) zero
// inter-symbol interference at the symbol centres. TAPS = 17 coefficients
// span eight symbols:
//     c[n] = round(1024 * rrc(n/2) / sum_k rrc(k/2)),  n = -8..8,
//     rrc(t) = [sin(pi t (1-b)) + 4 b t cos(pi t (1+b))] / [pi t (1-(4 b t)^2)],
// with t in symbols and b = 0.33. The sum of the coefficients is 1023, so the
// output is sum(c*x) >> 8: a DC gain of 4 that takes the 8-bit input to the
// 10-bit output, saturated at +-511.
//
// Interface: each in_valid strobe shifts x into the delay line; y and
// out_valid appear one clock later. The group delay is 8 samples (4 symbols),
// so symbol-centre parity is preserved from input to output.
// The filter type, its roll-off, the 8-bit input and 10-bit output follow the
// published receiver; length, coefficients and scaling are this design's.
module rrc_fir
  import qam_rx_pkg::*;
#(
  parameter int TAPS = 17
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  adc_t x,
  output logic out_valid,
  output fir_t y
);

  localparam int COEF [17] = '{3, 3, -15, 17, 29, -73, -41, 311, 555,
                               311, -41, -73, 29, 17, -15, 3, 3};

  adc_t                dl [TAPS];
  logic signed [19:0]  acc;
  logic signed [11:0]  scaled;

  // The newest sample x meets COEF[0]; dl[k] holds the sample k+1 strobes old.
  always_comb begin
    acc = 20'(x) * 20'(COEF[0]);
    for (int k = 1; k < TAPS; k++) acc = acc + 20'(dl[k-1]) * 20'(COEF[k]);
    scaled = 12'(acc >>> 8);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) dl[k] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dl[0] <= x;
        for (int k = 1; k < TAPS; k++) dl[k] <= dl[k-1];
        if (scaled > 511)       y <= 10'sd511;
        else if (scaled < -511) y <= -10'sd511;
        else                    y <= fir_t'(scaled);
      end
    end
  end

endmodule
