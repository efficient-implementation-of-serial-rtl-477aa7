// mf_integrator: serial-addition integrator of one correlation branch.
//
// Input `det` is the output of a one-bit multiplier (EX-OR of two sign bits),
// so det = 0 means a positive product.  Each cycle the integrator adds one
// for a positive product, so over an interval it holds the number of samples
// where received and local signs agree.  In the cycle `dump` is high (the last
// sample of the interval) the total including that sample is written to
// `sum`, `sum_valid` pulses for one cycle, and the accumulator restarts.
// ACC_W = 8 bits holds the 180 samples of a 30-chip interval.
module mf_integrator
  import dsss_pkg::*;
#(
  parameter int unsigned W = ACC_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         det,
  input  logic         dump,
  output logic [W-1:0] sum,
  output logic         sum_valid
);
  logic [W-1:0] acc;
  logic [W-1:0] acc_next;

  assign acc_next = acc + W'(!det);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      sum       <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum_valid <= dump;
      if (dump) begin
        sum <= acc_next;
        acc <= '0;
      end else begin
        acc <= acc_next;
      end
    end
  end
endmodule
