// esb: Extract Sign Bit.
//
// Keeps only the sign of a W-bit two's complement sample: s = 1 for a
// positive (or zero) sample and s = 0 for a negative one, the convention of
// the one-bit detector.  The bit is registered (one cycle latency), the
// "buffer" of the specification.  Reset clears it.
module esb
  import dsss_pkg::*;
#(
  parameter int unsigned W = SAMPLE_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  output logic                s
);
  always_ff @(posedge clk) begin
    if (rst) s <= 1'b0;
    else     s <= ~x[W-1];
  end
endmodule
