// sync_controller: sequencer of the burst synchronisation.
//
// A burst runs through overlapping phases, driven by events from the
// synchronisation blocks:
//   1. `activity` (burst detected) starts the gain iterations in agc_bed.
//   2. The first `gain_adj` starts coarse carrier phase acquisition
//      (`cpa_go` pulse, `start_cpa` level).
//   3. The second coarse `phase_adj` arms the timing estimator (`sta_go`
//      pulse, `start_sta` level), in time for the preamble transition.
//   4. `toggle` (transition found, timing set) starts a count of
//      symbol-centre filter outputs (`sym_tick`); a centre sample that the
//      divider skipped while moving the sampling grid (`skip`) counts too. The preamble has PRE_LEN
//      symbols with the transition after symbol TOGGLE_POS-1, and the data
//      filter delays by FIR_DELAY symbols, so tick number
//      LOAD_TICK = PRE_LEN - 1 - TOGGLE_POS + FIR_DELAY is the last preamble
//      symbol: `ft_load` marks it (its level seeds the decision levels) and
//      `ft_enable` rises. `data_en` is then high for the next `data_len`
//      symbol ticks (the data part of the burst, known from the time slot):
//      data are decided and the fine phase loop runs. `fine_active` rises
//      after the first data tick and stays high until the burst ends.
//   5. `burst_end` gives a one-clock `clear` to all blocks and returns to idle.
// `ft_load` is combinational with `sym_tick`; all else is registered.
//
// The order of events follows the published timing of the receiver; the
// preamble layout (TOGGLE_POS) and the counting of filter outputs are this
// design's.
module sync_controller #(
  parameter int PRE_LEN    = 23,
  parameter int TOGGLE_POS = 12,
  parameter int FIR_DELAY  = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic activity,
  input  logic gain_adj,
  input  logic phase_adj,
  input  logic toggle,
  input  logic sym_tick,
  input  logic burst_end,
  input  logic skip,
  input  logic [9:0] data_len,
  output logic cpa_go,
  output logic sta_go,
  output logic start_cpa,
  output logic start_sta,
  output logic toggled,
  output logic ft_load,
  output logic ft_enable,
  output logic fine_active,
  output logic data_en,
  output logic clear
);

  localparam int LOAD_TICK = PRE_LEN - 1 - TOGGLE_POS + FIR_DELAY;

  logic       in_burst;
  logic [1:0] n_gain, n_phase;
  logic [5:0] ticks;
  logic [9:0] n_data;

  assign ft_load = toggled && !ft_enable && sym_tick && (ticks == 6'(LOAD_TICK));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_burst    <= 1'b0;
      n_gain      <= '0;
      n_phase     <= '0;
      ticks       <= '0;
      cpa_go      <= 1'b0;
      sta_go      <= 1'b0;
      start_cpa   <= 1'b0;
      start_sta   <= 1'b0;
      toggled     <= 1'b0;
      ft_enable   <= 1'b0;
      fine_active <= 1'b0;
      data_en     <= 1'b0;
      n_data      <= '0;
      clear       <= 1'b0;
    end else begin
      cpa_go <= 1'b0;
      sta_go <= 1'b0;
      clear  <= 1'b0;
      if (burst_end) begin
        clear       <= 1'b1;
        in_burst    <= 1'b0;
        n_gain      <= '0;
        n_phase     <= '0;
        start_cpa   <= 1'b0;
        start_sta   <= 1'b0;
        toggled     <= 1'b0;
        ft_enable   <= 1'b0;
        fine_active <= 1'b0;
        data_en     <= 1'b0;
      end else begin
        if (activity && !in_burst) begin
          in_burst <= 1'b1;
          n_gain   <= '0;
          n_phase  <= '0;
        end
        if (in_burst && gain_adj) begin
          n_gain <= n_gain + 1'b1;
          if (n_gain == 0) begin
            cpa_go    <= 1'b1;
            start_cpa <= 1'b1;
          end
        end
        if (start_cpa && phase_adj && !ft_enable) begin
          n_phase <= n_phase + 1'b1;
          if (n_phase == 2'd1) begin
            sta_go    <= 1'b1;
            start_sta <= 1'b1;
          end
        end
        if (start_sta && toggle) begin
          toggled <= 1'b1;
          ticks   <= '0;
        end else if (toggled && skip && !ft_enable) begin
          ticks <= ticks + 1'b1;
        end else if (toggled && sym_tick && !ft_enable) begin
          ticks <= ticks + 1'b1;
          if (ft_load) begin
            ft_enable <= 1'b1;
            data_en   <= (data_len != 0);
            n_data    <= '0;
          end
        end else if (data_en && sym_tick) begin
          fine_active <= 1'b1;
          n_data      <= n_data + 1'b1;
          if (n_data == data_len - 1'b1) data_en <= 1'b0;
        end
      end
    end
  end

endmodule
