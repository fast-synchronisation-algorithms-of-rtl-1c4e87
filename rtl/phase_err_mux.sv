// phase_err_mux: selects which phase detector drives the carrier loop.
//
// During the preamble the coarse detector (10-bit error on A/D samples) feeds
// the loop filter; once fine tracking is enabled the decision-directed
// detector (11-bit error on symbols) does. Both are sign-extended to the
// 12-bit loop filter input; the selected strobe passes with it, the other is
// dropped, and `is_fine` tells the filter which loop order to apply. One
// register stage. Selection by the fine-tracking enable is this
// implementation's choice of control for the multiplexer.
module phase_err_mux
  import qam_rx_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sel_fine,
  input  logic signed [CERR_W-1:0] coarse_err,
  input  logic                     coarse_valid,
  input  logic signed [FERR_W-1:0] fine_err,
  input  logic                     fine_valid,
  output logic signed [LERR_W-1:0] err,
  output logic                     err_valid,
  output logic                     is_fine
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err       <= '0;
      err_valid <= 1'b0;
      is_fine   <= 1'b0;
    end else begin
      is_fine <= sel_fine;
      if (sel_fine) begin
        err_valid <= fine_valid;
        if (fine_valid) err <= LERR_W'(fine_err);
      end else begin
        err_valid <= coarse_valid;
        if (coarse_valid) err <= LERR_W'(coarse_err);
      end
    end
  end

endmodule
