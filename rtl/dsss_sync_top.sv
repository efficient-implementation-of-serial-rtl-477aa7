// dsss_sync_top: DS/SS serial-search synchronization / detection sub-system.
//
// Two independent halves share the sample clock:
//  * ds_ss_tx, the test transmitter, drives `tx` (with its data clock
//    `tx_clk0` and bit `tx_data`).  The channel between tx and rx (delay,
//    noise) is outside this module.
//  * The receiver takes `rx` and `rx_clk0`, a data-clock strobe aligned with
//    the received data (the received data is assumed to keep the same boundary
//    timing as the local data).  The local code generator, clocked by v_clk,
//    produces lc and dc; the one-bit detector correlates rx with both; the
//    v_clk generator retards the local code by Tc/2 while Acq_dec = 0 and by
//    Tc/6 while Track_dec = 0, one decision per 30-chip interval.
// Timing: rx_clk0 in cycle t means the new bit's first sample is at rx in
// cycle t+2 (the same latency the transmitter has from tx_clk0 to tx); dout
// updates (dout_valid) once per bit, 5 cycles after rx_clk0,
// i.e. 3 cycles after the first sample of the next bit reaches rx.
module dsss_sync_top
  import dsss_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  // transmitter
  output sample_t          tx,
  output logic             tx_clk0,
  output logic             tx_data,
  // receiver
  input  sample_t          rx,
  input  logic             rx_clk0,
  output sample_t          lc,
  output sample_t          dc,
  output logic             local_data,
  output logic             v_clk,
  output logic             slip,
  output logic             dout,
  output logic             dout_valid,
  output logic             acq_dec,
  output logic             track_dec,
  output logic             dec_valid,
  output logic [ACC_W-1:0] corr_max,
  output logic             corr_sel
);
  logic bit_start;

  ds_ss_tx u_tx (.clk, .rst, .tx, .clk0(tx_clk0), .data(tx_data));

  vclk_gen u_vclk (.clk, .rst, .dec_valid, .acq_dec, .track_dec, .v_clk, .slip);

  local_code_gen u_lcg (.clk, .rst, .clk0(rx_clk0), .v_clk, .lc, .dc, .altdata(local_data));

  // first sample of a received bit reaches rx two cycles after rx_clk0
  delay_line #(.W(1), .D(2)) u_bit_align (.clk, .rst, .d(rx_clk0), .q(bit_start));

  proposed_detector u_det (
    .clk, .rst, .rx, .lc, .dc, .bit_start,
    .dout, .dout_valid, .acq_dec, .track_dec, .dec_valid, .corr_max, .corr_sel
  );
endmodule
