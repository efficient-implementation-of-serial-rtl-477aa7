// majority_limiter: majority-vote data limiter.
//
// Two counters run over one data period: Cp counts samples with det = 0
// (positive product) and Cm counts samples with det = 1.  `bit_start` marks
// the first sample of a new data bit at `det`; in that cycle the finished
// period is decided, dout = 1 if Cp > Cm and dout = 0 if Cp < Cm, `dout_valid`
// pulses, and both counters restart with the current sample.  On a tie dout
// keeps its previous value.  The counters are W = 11 bits wide, enough for
// the worst case of 1800 samples per bit; they saturate rather than wrap.
// With the EX-OR spreading of the transmitter, dout is the polarity of the
// despread signal: dout = 1 for a transmitted 0.
module majority_limiter
  import dsss_pkg::*;
#(
  parameter int unsigned W = LIM_CNT_W
) (
  input  logic clk,
  input  logic rst,
  input  logic det,
  input  logic bit_start,
  output logic dout,
  output logic dout_valid
);
  logic [W-1:0] cp, cm;

  always_ff @(posedge clk) begin
    if (rst) begin
      cp         <= '0;
      cm         <= '0;
      dout       <= 1'b0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= bit_start;
      if (bit_start) begin
        if (cp > cm)      dout <= 1'b1;
        else if (cp < cm) dout <= 1'b0;
        cp <= W'(!det);
        cm <= W'(det);
      end else begin
        if (!det && cp != '1) cp <= cp + 1'b1;
        if ( det && cm != '1) cm <= cm + 1'b1;
      end
    end
  end
endmodule
