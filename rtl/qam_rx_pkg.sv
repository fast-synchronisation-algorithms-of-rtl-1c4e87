// qam_rx_pkg: word widths, types and shared constants of the burst-mode
// 16QAM receiver.
//
// The receiver runs on one master clock at R_OVS = 32 times the symbol rate
// (86.4 MHz for 2.7 Mbaud, 10.8 Mbit/s). The A/D converters deliver 8-bit I
// and Q at two samples per symbol; the root raised cosine filters deliver
// 10-bit words. These numbers follow the published receiver. The 6-bit gain
// word (0.5 dB per step) and the 16-bit carrier phase word are choices of this
// implementation.
package qam_rx_pkg;

  localparam int ADC_W   = 8;    // A/D converter word
  localparam int FIR_W   = 10;   // data filter output word
  localparam int MAG_W   = 10;   // CORDIC magnitude word
  localparam int GAIN_W  = 6;    // VGA gain word, 0.5 dB per LSB
  localparam int PH_W    = 16;   // carrier phase word, full circle = 2**PH_W
  localparam int TS_W    = 6;    // t_s / t_m word, unit Tsym/128
  localparam int R_OVS   = 32;   // master clock ticks per symbol
  localparam int HALF    = R_OVS / 2;  // ticks per A/D sample
  localparam int CERR_W  = 10;   // coarse phase error
  localparam int FERR_W  = 11;   // fine phase error
  localparam int LERR_W  = 12;   // loop filter input

  typedef logic signed [ADC_W-1:0]  adc_t;
  typedef logic signed [FIR_W-1:0]  fir_t;
  typedef logic        [MAG_W-1:0]  mag_t;
  typedef logic        [GAIN_W-1:0] gain_t;
  typedef logic        [PH_W-1:0]   phase_t;

  // One decided 16QAM symbol: per axis the sign (1 = negative) and whether
  // the point is on the outer level (|x| = 3) or the inner one (|x| = 1).
  typedef struct packed {
    logic si;
    logic oi;
    logic sq;
    logic oq;
  } qam_sym_t;

  // Status lines of the synchronisation sequence, in the order they occur.
  typedef struct packed {
    logic activity;     // burst detected (pulse)
    logic gain_adj;     // gain adjustment (pulse)
    logic start_cpa;    // coarse phase acquisition running
    logic phase_adj;    // carrier phase adjustment (pulse)
    logic start_sta;    // timing alignment armed
    logic toggle;       // preamble transition found, timing set (pulse)
    logic ft_enable;    // fine phase tracking enabled
    logic fine_active;  // data decided, fine phase loop running
    logic burst_end;    // end of burst (pulse)
  } rx_status_t;

endpackage
