// qam_burst_rx: digital part of a burst-mode 16QAM receiver with fast
// preamble synchronisation.
//
// The analogue front end (LNA, up-converter, SAW filter, variable gain
// amplifier, quadrature mixers, low-pass filters and the two 8-bit A/D
// converters) is outside; this block closes the three acquisition loops
// through it during a 23-symbol preamble:
//   * gain: cordic_mag -> agc_bed -> `gain` (VGA gain word, 0.5 dB steps);
//   * carrier phase: coarse_phase_est (preamble) or decision_fine_est (data)
//     -> phase_err_mux -> phase_loop_filter -> dds (local oscillator words
//     `lo_sin`/`lo_cos` and the offset register `phase_offset`);
//   * symbol timing: sta_estimator -> prog_divider -> `adc_sample`, the A/D
//     sample clock strobe at two samples per symbol.
// The A/D outputs feed the three loops directly (no filter delay in the
// loops) and the two root raised cosine filters (rrc_fir). Symbol-centre
// filter outputs are decided with adaptive levels, differentially decoded,
// serialised (`bit_out`/`bit_valid`, 10.8 Mbit/s at 2.7 Mbaud) and checked
// against the test pattern (`ber_bits`/`ber_errors`). sync_controller
// sequences it all; `status` brings out its events.
//
// Clocking: one master clock at 32x the symbol rate (86.4 MHz). The A/D
// model answers each `adc_sample` strobe with `adc_valid` and the sample a
// fixed number of clocks later, less than 16. `ts` is the 6-bit timing
// target (unit Tsym/128, see sta_estimator). `data_len` is the number of
// data symbols per burst, fixed by the time slot plan.
//
// Operating switches: `agc_en` low holds the gain word at minimum (gain
// iterations still pace the sequence); `fine_en` low keeps the decision-
// directed error out of the carrier loop, so the oscillator phase stays where
// coarse acquisition left it (decision levels still adapt). Both high is
// normal operation; the other settings serve measurements of the coarse loop
// alone and of the tolerance to input level changes.
module qam_burst_rx
  import qam_rx_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    adc_valid,
  input  adc_t                    adc_i,
  input  adc_t                    adc_q,
  input  logic [TS_W-1:0]         ts,
  input  logic [9:0]              data_len,
  input  logic                    agc_en,
  input  logic                    fine_en,
  output logic                    adc_sample,
  output gain_t                   gain,
  output phase_t                  phase_offset,
  output logic signed [FIR_W-1:0] lo_sin,
  output logic signed [FIR_W-1:0] lo_cos,
  output logic                    bit_valid,
  output logic                    bit_out,
  output logic [31:0]             ber_bits,
  output logic [31:0]             ber_errors,
  output rx_status_t              status
);

  // ---- magnitude, AGC and burst envelope -----------------------------------
  logic mag_valid;
  mag_t mag;
  logic activity, gain_adj, agc_done, burst_end;
  logic clear;

  cordic_mag u_cordic (
    .clk, .rst_n, .in_valid(adc_valid), .i_in(adc_i), .q_in(adc_q),
    .out_valid(mag_valid), .mag
  );

  agc_bed u_agc (
    .clk, .rst_n, .clear, .agc_en, .mag_valid, .mag,
    .activity, .gain_adj, .agc_done, .burst_end, .gain
  );

  // ---- carrier phase -------------------------------------------------------
  logic cpa_go, sta_go, start_cpa, start_sta, toggled;
  logic ft_load, ft_enable, fine_active, data_en;
  logic signed [CERR_W-1:0] cerr;
  logic                     cerr_valid;
  logic [1:0]               n_cpa;
  logic                     cpa_done;
  logic signed [FERR_W-1:0] ferr;
  logic                     ferr_valid;
  logic signed [LERR_W-1:0] lerr;
  logic                     lerr_valid, lerr_fine;
  phase_t                   upd;
  logic                     upd_valid;

  coarse_phase_est u_coarse (
    .clk, .rst_n, .clear, .start(cpa_go), .in_valid(adc_valid),
    .i_in(adc_i), .q_in(adc_q),
    .err(cerr), .err_valid(cerr_valid), .n_upd(n_cpa), .done(cpa_done)
  );

  phase_err_mux u_mux (
    .clk, .rst_n, .sel_fine(ft_enable && fine_en),
    .coarse_err(cerr), .coarse_valid(cerr_valid),
    .fine_err(ferr), .fine_valid(ferr_valid),
    .err(lerr), .err_valid(lerr_valid), .is_fine(lerr_fine)
  );

  phase_loop_filter u_loop (
    .clk, .rst_n, .clear, .err(lerr), .err_valid(lerr_valid), .is_fine(lerr_fine),
    .upd, .upd_valid
  );

  dds u_dds (
    .clk, .rst_n, .clear_offset(1'b0), .upd, .upd_valid,
    .phase_offset, .sin_out(lo_sin), .cos_out(lo_cos)
  );

  // ---- symbol timing -------------------------------------------------------
  logic              toggle, adj_valid, center, skip;
  logic signed [5:0] adj;
  logic [TS_W-1:0]   tm;

  sta_estimator u_sta (
    .clk, .rst_n, .clear, .arm(sta_go), .in_valid(adc_valid), .i_in(adc_i), .ts,
    .toggle, .tm, .adj, .adj_valid
  );

  prog_divider u_div (
    .clk, .rst_n, .adj_valid, .adj, .sample(adc_sample), .center, .skip
  );

  // ---- data path -----------------------------------------------------------
  logic     fir_valid_i, fir_valid_q, sym_tick;
  fir_t     fir_i, fir_q;
  logic     dec_valid, ref_valid;
  qam_sym_t dec;
  logic [FIR_W-1:0] i_norm, q_norm;
  logic       dd_valid;
  logic [3:0] dd_bits;

  rrc_fir u_fir_i (.clk, .rst_n, .in_valid(adc_valid), .x(adc_i), .out_valid(fir_valid_i), .y(fir_i));
  rrc_fir u_fir_q (.clk, .rst_n, .in_valid(adc_valid), .x(adc_q), .out_valid(fir_valid_q), .y(fir_q));

  // The divider's centre flag still describes the last A/D sample when its
  // filter output appears (A/D latency + 1 clock < 16 clocks).
  assign sym_tick = fir_valid_i && center;

  decision_fine_est u_dec (
    .clk, .rst_n, .clear, .load(ft_load), .data_en, .sym_valid(sym_tick),
    .i_in(fir_i), .q_in(fir_q),
    .dec_valid, .ref_valid, .dec, .ferr, .ferr_valid, .i_norm, .q_norm
  );

  diff_decoder u_diff (
    .clk, .rst_n, .clear, .load_ref(ref_valid), .ref_sym(dec),
    .in_valid(dec_valid), .sym(dec), .out_valid(dd_valid), .bits(dd_bits)
  );

  ps_converter u_ps (
    .clk, .rst_n, .clear, .in_valid(dd_valid), .bits(dd_bits),
    .bit_valid, .bit_out
  );

  ber_meter u_ber (
    .clk, .rst_n, .restart(activity), .bit_valid, .bit_in(bit_out),
    .bits(ber_bits), .errors(ber_errors)
  );

  // ---- sequencing ----------------------------------------------------------
  sync_controller u_ctrl (
    .clk, .rst_n, .activity, .gain_adj, .phase_adj(cerr_valid), .toggle,
    .sym_tick, .burst_end, .skip, .data_len,
    .cpa_go, .sta_go, .start_cpa, .start_sta, .toggled, .ft_load, .ft_enable,
    .fine_active, .data_en, .clear
  );

  assign status = '{activity: activity, gain_adj: gain_adj, start_cpa: start_cpa,
                    phase_adj: cerr_valid && !ft_enable, start_sta: start_sta,
                    toggle: toggle, ft_enable: ft_enable, fine_active: fine_active && fine_en,
                    burst_end: burst_end};

endmodule
