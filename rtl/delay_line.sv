// delay_line: D-cycle shift register for a W-bit signal (D >= 1),
// reset to zero.  Used to line strobes up with pipelined data.
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] sr [D];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(D); i++) sr[i] <= '0;
    end else begin
      sr[0] <= d;
      for (int i = 1; i < int'(D); i++) sr[i] <= sr[i-1];
    end
  end

  assign q = sr[D-1];
endmodule
