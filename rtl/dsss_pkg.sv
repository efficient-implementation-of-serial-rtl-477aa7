// dsss_pkg: numbers and types shared by the DS/SS serial-search synchronizer.
//
// Timing of the whole system: one sample clock (clk2, 6 MHz) drives every
// register.  Chips run at 1 MHz (SPC = 6 samples per chip), the PN code is
// 127 chips long, data bits run at 100 kb/s (DATA_CHIPS = 10 chips per bit)
// and the correlation interval is 30 chips = 180 samples.  These numbers
// follow the system specification; the two detection thresholds, the sample
// amplitude and the LFSR taps are this design's own choices.
package dsss_pkg;

  // Samples on the "air" and at the local generator: 8-bit two's complement.
  localparam int unsigned SAMPLE_W    = 8;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  localparam int unsigned SPC         = 6;    // samples per chip (6 MHz / 1 MHz)
  localparam int unsigned CODE_LEN    = 127;  // PN code length in chips
  localparam int unsigned LFSR_N      = 7;    // 2^7 - 1 = 127
  localparam logic [LFSR_N-1:0] LFSR_TAPS = 7'b1100000; // x^7 + x^6 + 1
  localparam int unsigned DATA_CHIPS  = 10;   // 100 kb/s data over 1 Mchip/s
  localparam int unsigned CORR_CHIPS  = 30;   // correlation interval in chips
  localparam int unsigned WIN_SAMPLES = CORR_CHIPS * SPC;  // 180
  localparam int unsigned ACC_W       = 8;    // 180 needs 8 bits
  localparam int unsigned LIM_CNT_W   = 11;   // worst case 1800 samples needs 11 bits

  // Detection thresholds on the winning correlation count (0..180).
  localparam int unsigned VTH1        = 128;  // acquisition (Acq_dec)
  localparam int unsigned VTH2        = 160;  // tracking (Track_dec)

  // BPSK amplitude: bit 1 -> +AMP, bit 0 -> -AMP.
  localparam int          AMP         = 127;

endpackage
