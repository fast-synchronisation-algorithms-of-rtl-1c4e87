// tb_qam_burst_rx: end-to-end test of the burst receiver at its default
// parameters.
//
// The testbench holds a behavioural transmitter, channel, variable gain
// amplifier, quadrature demodulator and A/D converter. Each burst is a
// 23-symbol preamble (12 symbols on the +I+Q corner, 11 on the -I-Q corner)
// followed by differentially encoded 16QAM data carrying a PRBS-9 pattern.
// Symbols are shaped by a root raised cosine pulse (roll-off 0.33) computed
// in real arithmetic and evaluated at the exact tick where the receiver asks
// for a sample, so the timing loop really moves the sampling instant. The
// channel applies an attenuation (0..15 dB), a carrier phase, a frequency
// offset and a delay per burst; the VGA applies 0.5 dB per gain step; the
// demodulator removes the DDS phase offset; the A/D adds +-0.5 LSB of
// uniform noise, rounds and clips to 8 bits, one clock after the strobe.
//
// Checks per burst: the number of bits delivered and their errors against an
// independent PRBS model, the final gain against the attenuation (+-1 dB),
// the residual carrier phase when fine tracking starts (< 5 degrees modulo
// 90), the sampling instant after timing alignment (within 2 ticks of the
// symbol centre), that gain, phase and timing acquisition all end inside the
// 23-symbol preamble, the burst-end detection and the return to minimum gain.
// The last four bursts use the operating switches: two with fine tracking
// off (at 300 Hz the coarse phase alone must hold the whole burst error-free;
// at 1.5 kHz the drift must cause errors, showing what fine tracking does),
// and two with the AGC off as well, at +-2 dB from the nominal level, where
// the gain must stay at minimum and the preamble-derived decision levels
// must still give no errors.
// It also counts each synchronisation mechanism and fails if one never ran.
`timescale 1ns/1ps
module tb_qam_burst_rx;
  import qam_rx_pkg::*;

  localparam int    NB      = 10;      // bursts
  localparam int    NDATA   = 256;     // data symbols per burst
  localparam int    PRE     = 23;
  localparam int    TOG     = 12;
  localparam int    GAP     = 24;      // idle symbols between bursts
  localparam real   PI      = 3.14159265358979;
  localparam real   FCLK    = 86.4e6;
  localparam int    WATCHDOG = 200000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic        adc_valid = 1'b0;
  adc_t        adc_i = '0, adc_q = '0;
  logic [5:0]  ts = 6'd63;
  logic [9:0]  data_len = 10'(NDATA);
  logic        agc_en, fine_en;
  logic        adc_sample;
  gain_t       gain;
  phase_t      phase_offset;
  logic signed [FIR_W-1:0] lo_sin, lo_cos;
  logic        bit_valid, bit_out;
  logic [31:0] ber_bits, ber_errors;
  rx_status_t  status;

  qam_burst_rx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- stimulus description ------------------------------------------------
  real att_db  [NB] = '{0.0, 15.0, 7.3, 3.0, 11.0, 5.5, 4.0, 2.0, -2.0, 2.0};
  real phi0_deg[NB] = '{20.0, -35.0, 130.0, 5.0, -100.0, 40.0, 60.0, -20.0, 10.0, -50.0};
  real df_hz   [NB] = '{0.0, 400.0, -400.0, 200.0, 1000.0, -1000.0, 300.0, 1500.0, 0.0, 0.0};
  real delay   [NB] = '{0.0, 5.5, 10.25, 13.0, 20.7, 27.3, 8.0, 3.0, 17.0, 24.5};
  bit  agc_on  [NB] = '{1, 1, 1, 1, 1, 1, 1, 1, 0, 0};
  bit  fine_on [NB] = '{1, 1, 1, 1, 1, 1, 0, 0, 0, 0};
  bit  exp_err [NB] = '{0, 0, 0, 0, 0, 0, 0, 1, 0, 0};
  longint t0 [NB];                 // tick of symbol 0 centre (before delay)
  int     slen = PRE + NDATA;
  int     si [PRE+NDATA], sq [PRE+NDATA];
  bit     prbs [4*NDATA + 64];

  function automatic real rrc(input real t);
    real b = 0.33;
    if (t < 1e-9 && t > -1e-9) return 1.0 - b + 4.0 * b / PI;
    if ((4.0*b*t - 1.0) < 1e-9 && (4.0*b*t - 1.0) > -1e-9 ||
        (4.0*b*t + 1.0) < 1e-9 && (4.0*b*t + 1.0) > -1e-9)
      return b / $sqrt(2.0) * ((1.0 + 2.0/PI) * $sin(PI/(4.0*b)) + (1.0 - 2.0/PI) * $cos(PI/(4.0*b)));
    return ($sin(PI*t*(1.0-b)) + 4.0*b*t*$cos(PI*t*(1.0+b))) / (PI*t*(1.0 - (4.0*b*t)**2));
  endfunction

  real pnorm;
  initial begin
    pnorm = 0.0;
    for (int k = -8; k <= 8; k++) pnorm += rrc(real'(k));
  end

  // transmitted symbols: same for every burst
  initial begin
    int q, dq, b1, b0;
    for (int n = 0; n < 9; n++) prbs[n] = 1'b1;
    for (int n = 9; n < $size(prbs); n++) prbs[n] = prbs[n-9] ^ prbs[n-5];
    for (int k = 0; k < PRE; k++) begin
      si[k] = (k < TOG) ? 3 : -3;
      sq[k] = si[k];
    end
    q = 2;
    for (int k = 0; k < NDATA; k++) begin
      dq = 2 * prbs[4*k] + prbs[4*k+1];
      b1 = prbs[4*k+2];
      b0 = prbs[4*k+3];
      q  = (q + dq) % 4;
      begin
        int mi, mq;
        mi = ((q % 2) == 0) ? (b1 ? 3 : 1) : (b0 ? 3 : 1);
        mq = ((q % 2) == 0) ? (b0 ? 3 : 1) : (b1 ? 3 : 1);
        si[PRE+k] = (q == 1 || q == 2) ? -mi : mi;
        sq[PRE+k] = (q == 2 || q == 3) ? -mq : mq;
      end
    end
  end

  // ---- channel + A/D -------------------------------------------------------
  longint tick = 0;
  always @(posedge clk) tick <= tick + 1;

  function automatic int burst_at(input longint t);
    for (int b = 0; b < NB; b++)
      if (t >= t0[b] - 10*32 && t <= t0[b] + (slen + 10) * 32) return b;
    return -1;
  endfunction

  real cur_phi;   // carrier phase error seen by the receiver, radians

  // operating switches of the burst being received, or of the next one
  function automatic int next_burst(input longint t);
    for (int b = 0; b < NB; b++)
      if (t <= t0[b] + (slen + 12) * 32) return b;
    return NB - 1;
  endfunction
  assign agc_en  = agc_on[next_burst(tick)];
  assign fine_en = fine_on[next_burst(tick)];

  task automatic analog(input longint t, output real re, output real im);
    int  b;
    real x, tt, a, ph, c, s, rr, ii;
    re = 0.0;
    im = 0.0;
    b  = burst_at(t);
    if (b < 0) return;
    tt = (real'(t - t0[b]) - delay[b]) / 32.0;
    for (int k = 0; k < slen; k++) begin
      x = tt - real'(k);
      if (x > -8.5 && x < 8.5) begin
        re += rrc(x) / pnorm * si[k];
        im += rrc(x) / pnorm * sq[k];
      end
    end
    a  = (80.0 / 3.0) * (10.0 ** (-att_db[b] / 20.0)) * (10.0 ** (0.5 * real'(gain) / 20.0));
    ph = phi0_deg[b] * PI / 180.0 + 2.0 * PI * df_hz[b] * real'(t - t0[b]) / FCLK
       - 2.0 * PI * real'(phase_offset) / 65536.0;
    cur_phi = ph;
    c  = $cos(ph);
    s  = $sin(ph);
    rr = a * (re * c - im * s);
    ii = a * (re * s + im * c);
    re = rr;
    im = ii;
  endtask

  function automatic adc_t quant(input real v);
    real r = v + (real'($urandom_range(0, 1000)) - 500.0) / 1000.0;
    if (r > 127.0) return 8'sd127;
    if (r < -128.0) return -8'sd128;
    return adc_t'($rtoi(r + ((r >= 0) ? 0.5 : -0.5)));
  endfunction

  longint last_sample_t;
  always @(posedge clk) begin
    real re, im;
    adc_valid <= 1'b0;
    if (adc_sample) begin
      analog(tick, re, im);
      adc_i <= quant(re);
      adc_q <= quant(im);
      adc_valid <= 1'b1;
      last_sample_t = tick;
      if ($test$plusargs("trace") && tick < 7000)
        $display("t=%0d b=%0d i=%0d q=%0d gain=%0d off=%0d phi=%0.1f st=%b", tick, burst_at(tick),
                 quant(re), quant(im), gain, phase_offset, cur_phi * 180.0 / PI, status);
    end
  end

  // ---- monitors --------------------------------------------------------------
  int n_act, n_gadj, n_cpa, n_padj, n_sta, n_tog, n_ft, n_fine, n_end;
  int n_fine_upd = 0, n_skip = 0, n_ambig = 0;
  int n_agc_off = 0, n_fine_off = 0, n_drift_err = 0, exp_errors = 0;
  int cur_b = -1;
  int ref_idx, burst_bits, burst_errs, total_bits;
  int g_adj_in_burst, p_adj_in_burst;
  longint t_act, t_tog;
  bit ft_seen;
  phase_t prev_off;
  bit prev_cpa = 0, prev_sta = 0, prev_fine = 0;

  function automatic real wrap90(input real p);
    real d = p * 180.0 / PI;
    while (d > 45.0) d -= 90.0;
    while (d <= -45.0) d += 90.0;
    return d;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (status.activity) begin
      n_act++;
      cur_b++;
      ref_idx = 0; burst_bits = 0; burst_errs = 0;
      g_adj_in_burst = 0; p_adj_in_burst = 0;
      t_act = tick; ft_seen = 0;
    end
    if (status.gain_adj) begin
      n_gadj++;
      g_adj_in_burst++;
      if (g_adj_in_burst == 3 && agc_on[cur_b]) #0.1
        check((int'(gain) - $rtoi(2.0 * att_db[cur_b] + 0.5)) <= 2 &&
              ($rtoi(2.0 * att_db[cur_b] + 0.5) - int'(gain)) <= 2,
              $sformatf("burst %0d: gain word %0d for %0.1f dB attenuation", cur_b, gain, att_db[cur_b]));
      if (g_adj_in_burst == 3 && !agc_on[cur_b]) #0.1
        check(gain == 0, $sformatf("burst %0d: AGC off but gain word %0d", cur_b, gain));
    end
    if (status.start_cpa && !prev_cpa) n_cpa++;
    prev_cpa <= status.start_cpa;
    if (status.phase_adj) begin n_padj++; p_adj_in_burst++; end
    if (status.start_sta && !prev_sta) n_sta++;
    prev_sta <= status.start_sta;
    if (dut.adj_valid && dut.u_div.shifted < 0) n_skip++;
    if (status.toggle) begin
      n_tog++;
      t_tog = tick;
      check(g_adj_in_burst == 3 && p_adj_in_burst == 3,
            $sformatf("burst %0d: %0d gain and %0d phase adjustments before the transition",
                      cur_b, g_adj_in_burst, p_adj_in_burst));
      check(tick - t0[cur_b] < PRE * 32,
            $sformatf("burst %0d: timing set %0d ticks after the first symbol", cur_b, tick - t0[cur_b]));
    end
    if (status.ft_enable && !ft_seen) begin
      real e;
      ft_seen = 1;
      n_ft++;
      e = wrap90(cur_phi);
      if (!exp_err[cur_b])
        check(e < 5.0 && e > -5.0, $sformatf("burst %0d: residual phase %0.2f deg", cur_b, e));
      if ($rtoi((cur_phi * 180.0 / PI - e) / 90.0 + 100.5) % 4 != 0) n_ambig++;
    end
    if (status.fine_active && !prev_fine) n_fine++;
    prev_fine <= status.fine_active;
    if (status.fine_active && phase_offset != prev_off) n_fine_upd++;
    prev_off <= phase_offset;
    if (bit_valid) begin
      burst_bits++;
      total_bits++;
      if (bit_out != prbs[ref_idx]) burst_errs++;
      ref_idx++;
    end
    if (status.burst_end) begin
      n_end++;
      check(burst_bits == 4 * NDATA, $sformatf("burst %0d: %0d bits delivered, expected %0d", cur_b, burst_bits, 4 * NDATA));
      if (!agc_on[cur_b]) n_agc_off++;
      if (!fine_on[cur_b]) n_fine_off++;
      if (exp_err[cur_b]) begin
        exp_errors += burst_errs;
        if (burst_errs > 0) n_drift_err++;
        check(burst_errs > 0, $sformatf("burst %0d: fine tracking off at %0.0f Hz but no bit errors", cur_b, df_hz[cur_b]));
      end else
        check(burst_errs == 0, $sformatf("burst %0d: %0d bit errors", cur_b, burst_errs));
      #3 check(gain == 0, $sformatf("burst %0d: gain %0d after burst end", cur_b, gain));
    end
  end

  always @(posedge clk) if ($test$plusargs("trace") && dut.sym_tick && tick > t0[1] - 400 && tick < t0[1] + 40*32)
    $display("sym t=%0d k=%0.2f fi=%0d fq=%0d ld=%b en=%b", tick, (real'(last_sample_t - t0[1]) - delay[1]) / 32.0,
             dut.fir_i, dut.fir_q, dut.ft_load, dut.ft_enable);

  // sampling instant after timing alignment: within 2 ticks of a half-symbol
  // point of the burst's own symbol grid
  always @(posedge clk) if (rst_n && adc_valid && cur_b >= 0 && dut.fine_active) begin
    real off;
    int  o;
    off = real'(last_sample_t - t0[cur_b]) - delay[cur_b];
    o   = $rtoi(off + 1600.0 + 0.5) % 16;
    checks++;
    if (!(o <= 2 || o >= 14)) begin
      failures++;
      $display("FAIL: burst %0d: sample %0.2f ticks off the symbol grid", cur_b, off);
    end
  end

  initial begin
    t0[0] = 40 * 32;
    for (int b = 1; b < NB; b++) t0[b] = t0[b-1] + (slen + GAP) * 32;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (tick > t0[NB-1] + (slen + GAP) * 32);
    check(ber_bits == 32'(total_bits) && total_bits == NB * 4 * NDATA,
          $sformatf("BER meter counted %0d bits, monitor %0d", ber_bits, total_bits));
    check(ber_errors == 32'(exp_errors), $sformatf("BER meter counted %0d errors, monitor %0d", ber_errors, exp_errors));
    $display("mechanisms: activity=%0d gain_adj=%0d start_cpa=%0d phase_adj=%0d start_sta=%0d toggle=%0d ft_enable=%0d fine_active=%0d fine_updates=%0d burst_end=%0d sample_skip=%0d quadrant_ambiguity=%0d agc_off=%0d fine_off=%0d drift_errors_without_fine=%0d",
             n_act, n_gadj, n_cpa, n_padj, n_sta, n_tog, n_ft, n_fine, n_fine_upd, n_end, n_skip, n_ambig,
             n_agc_off, n_fine_off, n_drift_err);
    check(n_act == NB && n_end == NB && n_tog == NB && n_ft == NB && n_fine == NB - n_fine_off, "every burst ran the full sequence");
    check(n_agc_off > 0 && n_fine_off > 0 && n_drift_err > 0, "operating switches exercised");
    check(n_gadj == 3 * NB && n_padj == 3 * NB && n_cpa == NB && n_sta == NB, "three gain and three phase adjustments per burst");
    check(n_fine_upd > 0, "fine phase loop moved the oscillator");
    check(n_skip > 0, "timing correction large enough to skip a sample");
    check(n_ambig > 0, "carrier locked on a rotated quadrant at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG * 2) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
