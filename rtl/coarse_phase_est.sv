// coarse_phase_est: coarse carrier phase error detector for the preamble.
//
// The preamble sits on a diagonal corner of the constellation, so it looks
// like BPSK with a very long symbol and its phase can be measured without
// symbol timing. Per A/D sample the detector forms
//     eps = (|I| - |Q|) * sgn(I) * sgn(Q),
// which is zero when the vector lies on a diagonal and has the sign of the
// phase error otherwise (about -sqrt(2) * |v| * sin(phi)). After `start` it
// issues N_UPD phase adjustments: each waits WAIT samples (loop latency
// through the DDS, mixer and A/D), then averages N_AVG samples and outputs
// the 10-bit mean on `err` with an `err_valid` pulse. `done` is high after
// the last adjustment.
//
// The error formula, the 8-bit input straight from the A/D, the 10-bit error
// and the three adjustments follow the published receiver. sgn(0) = +1, the
// averaging and the waits are this implementation's choices.
module coarse_phase_est
  import qam_rx_pkg::*;
#(
  parameter int N_UPD = 3,
  parameter int N_AVG = 2,
  parameter int WAIT  = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     start,
  input  logic                     in_valid,
  input  adc_t                     i_in,
  input  adc_t                     q_in,
  output logic signed [CERR_W-1:0] err,
  output logic                     err_valid,
  output logic [1:0]               n_upd,
  output logic                     done
);

  localparam int AVG_SH = $clog2(N_AVG);
  localparam int ACC_W  = CERR_W + AVG_SH;

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ACC, S_DONE} state_t;

  state_t                   state;
  logic [3:0]               cnt;
  logic signed [ACC_W-1:0]  acc;
  logic signed [CERR_W-1:0] eps;
  logic signed [ACC_W-1:0]  acc_n;

  // eps = (|I| - |Q|) * sgn(I) * sgn(Q); |x| of an 8-bit word fits 9 bits.
  always_comb begin
    logic signed [ADC_W+1:0] ai, aq, d;
    ai  = (i_in < 0) ? -(ADC_W+2)'(i_in) : (ADC_W+2)'(i_in);
    aq  = (q_in < 0) ? -(ADC_W+2)'(q_in) : (ADC_W+2)'(q_in);
    d   = ai - aq;
    eps = ((i_in < 0) != (q_in < 0)) ? -d : d;
    acc_n = acc + ACC_W'(eps);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      acc       <= '0;
      err       <= '0;
      err_valid <= 1'b0;
      n_upd     <= '0;
    end else begin
      err_valid <= 1'b0;
      if (clear) begin
        state <= S_IDLE;
        n_upd <= '0;
      end else if (start) begin
        state <= S_WAIT;
        cnt   <= '0;
        n_upd <= '0;
      end else if (in_valid) begin
        unique case (state)
          S_IDLE, S_DONE: ;
          S_WAIT: begin
            acc <= '0;
            if (cnt == 4'(WAIT - 1)) begin
              state <= S_ACC;
              cnt   <= '0;
            end else cnt <= cnt + 1'b1;
          end
          S_ACC: begin
            if (cnt == 4'(N_AVG - 1)) begin
              err       <= CERR_W'(acc_n >>> AVG_SH);
              err_valid <= 1'b1;
              n_upd     <= n_upd + 1'b1;
              cnt       <= '0;
              state     <= (n_upd == 2'(N_UPD - 1)) ? S_DONE : S_WAIT;
            end else begin
              acc <= acc_n;
              cnt <= cnt + 1'b1;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign done = (state == S_DONE);

endmodule
