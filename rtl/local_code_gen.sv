// local_code_gen: local code generator of the receiver.
//
// Produces the two reference signals of the detector, as 8-bit samples:
//   lc = BPSK(PN)            the bare spreading code
//   dc = BPSK(PN xor data)   the code carrying an alternating data pattern
// The PN generator advances on the variable chip clock `v_clk`; the
// alternating data source toggles on the data-clock strobe `clk0`, which is
// assumed to be aligned with the received data boundaries.  Correlating the
// input against both references means at least one branch sees the full
// correlation while data is present.  Latency: a strobe or a chip step in
// cycle t shows on the outputs from cycle t+2 (state register, then the
// modulator's output register).  Structure (data source, PN generator,
// EX-OR, two BPSK modulators) follows the specification.
module local_code_gen
  import dsss_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    clk0,
  input  logic    v_clk,
  output sample_t lc,
  output sample_t dc,
  output logic    altdata
);
  logic code;

  alt_data_src u_data (.clk, .rst, .clk0, .data(altdata));
  pn_gen       u_pn   (.clk, .rst, .en(v_clk), .chip(code));

  bpsk_mod u_mod_dc (.clk, .rst, .bit_in(code ^ altdata), .sample(dc));
  bpsk_mod u_mod_lc (.clk, .rst, .bit_in(code),           .sample(lc));
endmodule
