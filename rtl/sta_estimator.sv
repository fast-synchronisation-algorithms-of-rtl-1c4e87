// sta_estimator: single-shot symbol timing error estimator.
//
// The preamble contains one transition between opposite corners. Around its
// zero crossing the I waveform is close to a straight line, so the crossing
// time can be found from the two A/D samples I'1, I'2 that straddle it
// (half a symbol apart) without knowing the amplitude or the carrier phase.
// The position t_m of the crossing, measured from I'1 in units of
// (Tsym/2)/64 = Tsym/128, is found by recursive bisection of the line
// through I'1 and I'2: with the interval ends a and b, the value at the middle
// is (a+b)/2 (an add and a shift); if it has the sign of a the crossing lies
// in the right half and the next bit of t_m is 1, else it is 0. P_STEPS = 6
// steps, one per clock, give the 6-bit t_m.
//
// The programmed value t_s (`ts`, same unit) is where the crossing should be
// when sampling is right. The divider correction is
//     adj = round((t_m - t_s) / 4)  master clock ticks (Tsym/32 each),
// positive = sample later. After `arm`, the first pair of consecutive samples
// of opposite sign whose difference exceeds MIN_SWING starts the estimate;
// P_STEPS + 1 clocks after the second sample `toggle` and `adj_valid` pulse
// together and the block waits for `clear`.
//
// The estimator, the bisection, P = 6 and the 6-bit t_s word follow the
// published receiver; the units of t_m/t_s, the rounding and the swing test
// are this implementation's choices.
module sta_estimator
  import qam_rx_pkg::*;
#(
  parameter int P_STEPS   = 6,
  parameter int MIN_SWING = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              arm,
  input  logic              in_valid,
  input  adc_t              i_in,
  input  logic [TS_W-1:0]   ts,
  output logic              toggle,
  output logic [TS_W-1:0]   tm,
  output logic signed [5:0] adj,
  output logic              adj_valid
);

  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_BISECT, S_DONE} state_t;

  state_t                  state;
  adc_t                    prev;
  logic                    have_prev;
  logic signed [ADC_W:0]   a, b, m;
  logic [2:0]              step;
  logic [TS_W-1:0]         t;
  logic signed [ADC_W:0]   swing;
  logic signed [TS_W:0]    terr;
  logic                    bit_n;

  assign swing = $signed({prev[ADC_W-1], prev}) - $signed({i_in[ADC_W-1], i_in});
  assign m     = (a + b) >>> 1;
  assign bit_n = (m[ADC_W] == a[ADC_W]);
  assign terr  = $signed({1'b0, t[TS_W-2:0], bit_n}) - $signed({1'b0, ts});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      prev      <= '0;
      have_prev <= 1'b0;
      a         <= '0;
      b         <= '0;
      step      <= '0;
      t         <= '0;
      tm        <= '0;
      adj       <= '0;
      adj_valid <= 1'b0;
      toggle    <= 1'b0;
    end else begin
      adj_valid <= 1'b0;
      toggle    <= 1'b0;
      if (clear) begin
        state     <= S_IDLE;
        have_prev <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: if (arm) begin
            state     <= S_ARMED;
            have_prev <= 1'b0;
          end
          S_ARMED: if (in_valid) begin
            prev      <= i_in;
            have_prev <= 1'b1;
            if (have_prev && (prev[ADC_W-1] != i_in[ADC_W-1]) &&
                ((swing >= (ADC_W+1)'(MIN_SWING)) || (-swing >= (ADC_W+1)'(MIN_SWING)))) begin
              a     <= $signed({prev[ADC_W-1], prev});
              b     <= $signed({i_in[ADC_W-1], i_in});
              t     <= '0;
              step  <= '0;
              state <= S_BISECT;
            end
          end
          S_BISECT: begin
            if (bit_n) a <= m;
            else       b <= m;
            t    <= {t[TS_W-2:0], bit_n};
            step <= step + 1'b1;
            if (step == 3'(P_STEPS - 1)) begin
              tm        <= {t[TS_W-2:0], bit_n};
              adj       <= 6'((terr + 7'sd2) >>> 2);
              adj_valid <= 1'b1;
              toggle    <= 1'b1;
              state     <= S_DONE;
            end
          end
          S_DONE: ;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
