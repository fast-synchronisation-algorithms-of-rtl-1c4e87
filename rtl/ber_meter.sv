// ber_meter: burst bit error rate measurement.
//
// The test transmitter sends a PRBS-9 pattern (x^9 + x^5 + 1, all-ones
// start) as the data of every burst. The meter runs the same generator:
// `restart` reloads the all-ones state at the start of a burst, and each
// received bit advances it and is compared with the reference bit. `bits`
// counts compared bits and `errors` the mismatches, both over all bursts
// since reset; BER = errors / bits. A measurement circuit of this kind is
// part of the published receiver prototype; the pattern and counter widths
// are this design's choice.
module ber_meter #(
  parameter int CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic             bit_valid,
  input  logic             bit_in,
  output logic [CNT_W-1:0] bits,
  output logic [CNT_W-1:0] errors
);

  logic [8:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr   <= '1;
      bits   <= '0;
      errors <= '0;
    end else if (restart) begin
      lfsr <= '1;
    end else if (bit_valid) begin
      lfsr <= {lfsr[7:0], lfsr[8] ^ lfsr[4]};
      bits <= bits + 1'b1;
      if (bit_in != lfsr[8]) errors <= errors + 1'b1;
    end
  end

endmodule
