// bpsk_mod: BPSK mapper producing 8-bit samples.
//
// Each cycle the chip bit is mapped to an antipodal two's complement sample,
// bit 1 -> +A and bit 0 -> -A (A = 127), and registered (one cycle latency).  The
// 8-bit sample width follows the specification; the antipodal (baseband)
// mapping without a carrier and the amplitude are this design's choices.
module bpsk_mod
  import dsss_pkg::*;
#(
  parameter int W   = SAMPLE_W,
  parameter int A   = AMP
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                bit_in,
  output logic signed [W-1:0] sample
);
  localparam logic signed [W-1:0] POS = W'(A);
  localparam logic signed [W-1:0] NEG = W'(-A);

  always_ff @(posedge clk) begin
    if (rst) sample <= '0;
    else     sample <= bit_in ? POS : NEG;
  end
endmodule
