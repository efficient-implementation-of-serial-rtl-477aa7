// pn_gen: maximal-length PN code generator.
//
// A Fibonacci LFSR of N stages with feedback polynomial given by TAPS
// (default x^7 + x^6 + 1, N = 7) produces a 2^N - 1 = 127 chip sequence.
// The register shifts once for every cycle with `en` high, so `en` is the
// chip clock (v_clk for the receiver's local generator).  `chip` is the oldest
// stage and is valid in the same cycle as the state.  Synchronous reset loads
// the all-ones seed, so the sequence phase after reset is fixed.
// The code length follows the specification; the polynomial and seed are
// this design's choices.
module pn_gen
  import dsss_pkg::*;
#(
  parameter int unsigned     N    = LFSR_N,
  parameter logic [N-1:0]    TAPS = LFSR_TAPS
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic chip
);
  logic [N-1:0] state;

  always_ff @(posedge clk) begin
    if (rst)     state <= '1;
    else if (en) state <= {state[N-2:0], ^(state & TAPS)};
  end

  assign chip = state[N-1];

  // An LFSR must never reach the all-zero lock-up state.
  a_no_lockup: assert property (@(posedge clk) disable iff (rst) state != '0);
endmodule
