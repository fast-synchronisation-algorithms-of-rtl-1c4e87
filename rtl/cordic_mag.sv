// cordic_mag: magnitude of an I/Q sample by CORDIC vectoring.
//
// The vector is first folded into the right half plane (|I|, Q) and then
// turned towards the I axis in N_ROT micro-rotations: in step i it is turned
// by -atan(2^-i) if Q is positive and by +atan(2^-i) otherwise, using only
// shifts, additions and subtractions. After the last step I holds
// K * sqrt(I^2 + Q^2), with the CORDIC gain K = prod sqrt(1 + 2^-2i)
// (1.6425 for four rotations). K is left in: the gain table that reads this
// value is built for the scaled magnitude.
//
// Interface: in_valid/i_in/q_in are taken on a rising clock edge; mag and
// out_valid appear one clock later. The rotations are unrolled in one clock.
// N_ROT = 4 is the rotation count the receiver's accuracy analysis uses; the
// one-clock latency and the unrolled form are this implementation's choice.
module cordic_mag
  import qam_rx_pkg::*;
#(
  parameter int N_ROT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  adc_t i_in,
  input  adc_t q_in,
  output logic out_valid,
  output mag_t mag
);

  // Working width: 8-bit input grows by sqrt(2) * K < 2.4, so 11 bits hold it.
  localparam int W = ADC_W + 3;
  typedef logic signed [W-1:0] w_t;

  w_t mag_c;

  always_comb begin
    w_t x, y, xn, yn;
    x = (i_in < 0) ? -w_t'(i_in) : w_t'(i_in);
    y = w_t'(q_in);
    for (int i = 0; i < N_ROT; i++) begin
      if (y >= 0) begin
        xn = x + (y >>> i);
        yn = y - (x >>> i);
      end else begin
        xn = x - (y >>> i);
        yn = y + (x >>> i);
      end
      x = xn;
      y = yn;
    end
    mag_c = x;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mag       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) mag <= (mag_c < 0) ? '0 : mag_t'(mag_c);
    end
  end

endmodule
