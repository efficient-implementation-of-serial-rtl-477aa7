// proposed_detector: the one-bit serial-search detector (ESB, MAXCORR,
// LIMITER).
//
// Three ESB stages reduce the received sample rx and the local references lc
// and dc to sign bits; MAXCORR correlates them over each interval and issues
// Acq_dec / Track_dec; the majority limiter recovers the data from the
// received x lc product.  `bit_start` marks the first sample of a received
// data bit at the rx input; it is delayed here by the two pipeline stages
// (ESB, multiplier) so that it lines up with `det` at the limiter.
// dout is updated one cycle after the delayed strobe.
module proposed_detector
  import dsss_pkg::*;
#(
  parameter int unsigned WIN = WIN_SAMPLES,
  parameter int unsigned TH1 = VTH1,
  parameter int unsigned TH2 = VTH2
) (
  input  logic             clk,
  input  logic             rst,
  input  sample_t          rx,
  input  sample_t          lc,
  input  sample_t          dc,
  input  logic             bit_start,
  output logic             dout,
  output logic             dout_valid,
  output logic             acq_dec,
  output logic             track_dec,
  output logic             dec_valid,
  output logic [ACC_W-1:0] corr_max,
  output logic             corr_sel
);
  logic rx_s, lc_s, dc_s, det, bit_start_d;

  esb u_esb_rx (.clk, .rst, .x(rx), .s(rx_s));
  esb u_esb_lc (.clk, .rst, .x(lc), .s(lc_s));
  esb u_esb_dc (.clk, .rst, .x(dc), .s(dc_s));

  maxcorr #(.WIN(WIN), .W(ACC_W), .TH1(TH1), .TH2(TH2)) u_maxcorr (
    .clk, .rst, .rx_s, .lc_s, .dc_s, .det,
    .acq_dec, .track_dec, .dec_valid, .corr_max, .corr_sel
  );

  delay_line #(.W(1), .D(2)) u_align (.clk, .rst, .d(bit_start), .q(bit_start_d));

  majority_limiter u_lim (.clk, .rst, .det, .bit_start(bit_start_d), .dout, .dout_valid);
endmodule
