// phase_loop_filter: loop filter of the carrier phase loop.
//
// The loop closes through the DDS phase offset register: every output is an
// increment for that register, and the demodulator subtracts the register
// from the received carrier phase.
//   * Coarse mode (first-order loop): upd = -KC * err. With the preamble corner
//     at the AGC level |v| = 113 A/D units the coarse error is about
//     -sqrt(2)*113*phi, and KC = 49 makes the correction 0.9 * phi in units
//     of 2*pi/65536: an open loop gain of 0.9.
//   * Fine mode (second-order loop): an integrator collects KI/2^KI_SH * err
//     and the output is -(KP/2^KP_SH * err + integrator), so a steady phase
//     drift from a frequency offset is tracked with no standing error.
// The integrator is cleared by `clear`. upd_valid follows err_valid by one
// clock.
//
// The loop orders and the open loop gain 0.9 follow the published receiver;
// the fine loop gains are this implementation's (the published text leaves
// them to the designer).
module phase_loop_filter
  import qam_rx_pkg::*;
#(
  parameter int KC    = 49,
  parameter int KP    = 13,
  parameter int KP_SH = 3,
  parameter int KI    = 1,
  parameter int KI_SH = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic signed [LERR_W-1:0] err,
  input  logic                     err_valid,
  input  logic                     is_fine,
  output phase_t                   upd,
  output logic                     upd_valid
);

  localparam int IW = PH_W + KI_SH + 2;   // integrator with fraction bits

  logic signed [IW-1:0] integ, integ_n;
  logic signed [31:0]   prop, corr;

  always_comb begin
    integ_n = integ + IW'(err * KI);
    prop    = (32'(err) * KP) >>> KP_SH;
    corr    = is_fine ? -(prop + 32'(integ_n >>> KI_SH)) : -(32'(err) * KC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ     <= '0;
      upd       <= '0;
      upd_valid <= 1'b0;
    end else begin
      upd_valid <= 1'b0;
      if (clear) integ <= '0;
      else if (err_valid) begin
        if (is_fine) integ <= integ_n;
        upd       <= PH_W'(corr);
        upd_valid <= 1'b1;
      end
    end
  end

endmodule
