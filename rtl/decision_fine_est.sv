// decision_fine_est: 16QAM data decision with adaptive levels and the
// decision-directed fine phase error detector.
//
// The levels of the received constellation are learnt from the signal itself.
// On `load` (the last preamble symbol, a diagonal corner) the magnitudes of I
// and Q become the initial normalised values I_norm and Q_norm. From then on,
// on each symbol-centre strobe with `data_en` high:
//   * decision: per axis the sign, and "outer" when |x| >= Dec = 2/3 * norm
//     (the corner level is 3, the inner level 1, the threshold sits at 2);
//   * if both axes are outer the symbol is one of the four diagonal corners
//     (the outer-circle QPSK points). Only those feed the tracker:
//         norm(k+1) = 7/8 * norm(k) + 1/8 * |x|
//     and the fine phase error, the coarse formula with the norms taken out:
//         ferr = ((|I| - I_norm) - (|Q| - Q_norm)) * sgn(I) * sgn(Q).
//     Subtracting the norms keeps an I/Q level imbalance from reading as a
//     phase error.
// The norms are kept with three extra fraction bits.
//
// Outputs are registered: dec/dec_valid and ferr/ferr_valid one clock after
// the strobe. `ref_valid` marks the decision of the loaded preamble symbol,
// the first reference of the differential decoder.
//
// The norm recursion, the 2/3 decision levels and the use of the outer
// diagonal points follow the published receiver. The exact form of the fine
// error and 2/3 as (x*683)>>10 are this implementation's reading.
module decision_fine_est
  import qam_rx_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     load,
  input  logic                     data_en,
  input  logic                     sym_valid,
  input  fir_t                     i_in,
  input  fir_t                     q_in,
  output logic                     dec_valid,
  output logic                     ref_valid,
  output qam_sym_t                 dec,
  output logic signed [FERR_W-1:0] ferr,
  output logic                     ferr_valid,
  output logic [FIR_W-1:0]         i_norm,
  output logic [FIR_W-1:0]         q_norm
);

  localparam int NQ = FIR_W + 3;   // norm with 3 fraction bits

  logic [NQ-1:0]  in_q, qn_q;
  logic [FIR_W:0] ai, aq;          // |I|, |Q| up to 512
  logic [FIR_W:0] dec_i, dec_q;
  logic           oi, oq;
  logic signed [FIR_W+2:0] fe;

  always_comb begin
    ai    = (i_in < 0) ? (FIR_W+1)'(-$signed({i_in[FIR_W-1], i_in})) : (FIR_W+1)'(i_in);
    aq    = (q_in < 0) ? (FIR_W+1)'(-$signed({q_in[FIR_W-1], q_in})) : (FIR_W+1)'(q_in);
    dec_i = (FIR_W+1)'(({11'b0, i_norm} * 21'd683) >> 10);
    dec_q = (FIR_W+1)'(({11'b0, q_norm} * 21'd683) >> 10);
    oi    = ai >= dec_i;
    oq    = aq >= dec_q;
    fe    = ($signed({2'b00, ai}) - $signed({3'b000, i_norm}))
          - ($signed({2'b00, aq}) - $signed({3'b000, q_norm}));
    if ((i_in < 0) != (q_in < 0)) fe = -fe;
  end

  assign i_norm = FIR_W'(in_q >> 3);
  assign q_norm = FIR_W'(qn_q >> 3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q       <= '0;
      qn_q       <= '0;
      dec        <= '0;
      dec_valid  <= 1'b0;
      ref_valid  <= 1'b0;
      ferr       <= '0;
      ferr_valid <= 1'b0;
    end else begin
      dec_valid  <= 1'b0;
      ref_valid  <= 1'b0;
      ferr_valid <= 1'b0;
      if (clear) begin
        in_q <= '0;
        qn_q <= '0;
      end else if (sym_valid && load) begin
        in_q      <= NQ'({ai, 3'b000});
        qn_q      <= NQ'({aq, 3'b000});
        dec       <= '{si: i_in < 0, oi: 1'b1, sq: q_in < 0, oq: 1'b1};
        ref_valid <= 1'b1;
      end else if (sym_valid && data_en) begin
        dec       <= '{si: i_in < 0, oi: oi, sq: q_in < 0, oq: oq};
        dec_valid <= 1'b1;
        if (oi && oq) begin
          in_q       <= in_q - (in_q >> 3) + NQ'(ai);
          qn_q       <= qn_q - (qn_q >> 3) + NQ'(aq);
          ferr       <= (fe > 1023) ? 11'sd1023 : (fe < -1024) ? -11'sd1024 : FERR_W'(fe);
          ferr_valid <= 1'b1;
        end
      end
    end
  end

endmodule
