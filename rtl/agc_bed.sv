// agc_bed: burst envelope detection and automatic gain control.
//
// Between bursts the VGA gain word is 0 (minimum gain), so that the strongest
// expected burst stays inside the A/D range. Every A/D sample brings a CORDIC
// magnitude. When it exceeds ACT_THRESH a burst is present: `activity`
// pulses and N_ITER gain iterations follow. Each iteration skips AGC_WAIT
// samples for the amplifier to settle (FIRST_WAIT samples for the first, to
// let the rising burst edge pass),
// averages two magnitudes, looks up the correction in dB in agc_db_table and
// adds it to the gain word with saturation (`gain_adj` pulses). Each pass
// shrinks the remaining level error, which is why iterating improves the
// accuracy. After the last iteration `agc_done` is high and the block watches
// for the burst end: EOB_COUNT consecutive magnitudes below EOB_THRESH give a
// `burst_end` pulse and return the gain word to minimum.
//
// ACT_THRESH follows threshold = sqrt(Vmin * Vnoise) with Vmin the full scale
// over the 15 dB dynamic range (127 / 5.62 = 22.6) and a noise floor of one
// LSB: 4.75, times the CORDIC gain 1.64, is 8. EOB_THRESH is half the
// magnitude of the innermost 16QAM point at the AGC target level. The
// detection rule, the three iterations and the return to minimum gain follow
// the published receiver; the two-sample average, the settling wait, the
// end-of-burst count and the numeric thresholds are this implementation's.
//
// `agc_en` low freezes the gain word (the iterations, their `gain_adj` pulses
// and burst detection still run, so the rest of the receiver keeps its
// sequence): the receiver then works at minimum gain, the mode used to measure
// how much input level change the preamble-derived decision levels tolerate.
//
// Timing: `gain` changes on the clock edge after the second averaged sample;
// `clear` aborts a burst at any time and takes priority.
module agc_bed
  import qam_rx_pkg::*;
#(
  parameter int ACT_THRESH = 8,
  parameter int EOB_THRESH = 37,
  parameter int EOB_COUNT  = 10,
  parameter int N_ITER     = 3,
  parameter int AGC_WAIT   = 2,
  parameter int FIRST_WAIT = 4,
  parameter int TARGET_MAG = 186
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  agc_en,
  input  logic  mag_valid,
  input  mag_t  mag,
  output logic  activity,
  output logic  gain_adj,
  output logic  agc_done,
  output logic  burst_end,
  output gain_t gain
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_MEAS, S_TRACK} state_t;

  state_t                state;
  logic [3:0]            cnt;
  logic [3:0]            iter;
  logic [MAG_W:0]        acc;
  mag_t                  avg;
  logic signed [7:0]     corr;
  logic signed [GAIN_W+2:0] gsum;

  assign avg = mag_t'((acc + (MAG_W+1)'(mag)) >> 1);

  agc_db_table #(.TARGET_MAG(TARGET_MAG)) u_table (.mag(avg), .corr(corr));

  always_comb begin
    gsum = $signed({3'b000, gain}) + (GAIN_W+3)'(corr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      iter      <= '0;
      acc       <= '0;
      gain      <= '0;
      activity  <= 1'b0;
      gain_adj  <= 1'b0;
      burst_end <= 1'b0;
      agc_done  <= 1'b0;
    end else begin
      activity  <= 1'b0;
      gain_adj  <= 1'b0;
      burst_end <= 1'b0;
      if (clear) begin
        state    <= S_IDLE;
        gain     <= '0;
        agc_done <= 1'b0;
      end else if (mag_valid) begin
        unique case (state)
          S_IDLE: if (mag > MAG_W'(ACT_THRESH)) begin
            activity <= 1'b1;
            state    <= S_WAIT;
            cnt      <= 4'(AGC_WAIT - FIRST_WAIT);
            iter     <= '0;
          end
          S_WAIT: begin
            if (cnt == 4'(AGC_WAIT - 1)) begin
              state <= S_MEAS;
              cnt   <= '0;
            end else cnt <= cnt + 1'b1;
          end
          S_MEAS: begin
            if (cnt == 0) begin
              acc <= (MAG_W+1)'(mag);
              cnt <= 4'd1;
            end else begin
              gain_adj <= 1'b1;
              if (!agc_en) gain <= gain;
              else if (gsum < 0) gain <= '0;
              else if (gsum > (2**GAIN_W - 1)) gain <= '1;
              else gain <= gain_t'(gsum);
              cnt  <= '0;
              iter <= iter + 1'b1;
              if (iter == 4'(N_ITER - 1)) begin
                state    <= S_TRACK;
                agc_done <= 1'b1;
              end else state <= S_WAIT;
            end
          end
          S_TRACK: begin
            if (mag < MAG_W'(EOB_THRESH)) begin
              if (cnt == 4'(EOB_COUNT - 1)) begin
                burst_end <= 1'b1;
                gain      <= '0;
                agc_done  <= 1'b0;
                state     <= S_IDLE;
                cnt       <= '0;
              end else cnt <= cnt + 1'b1;
            end else cnt <= '0;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
