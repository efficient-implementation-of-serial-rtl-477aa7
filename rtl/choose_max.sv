// choose_max: "Choose Max" of the detector.
//
// Combinational W-bit magnitude comparator: `max` is the larger of the two
// branch correlations and `sel` is 1 when branch b (the data branch) wins
// strictly; on a tie branch a is reported.
module choose_max
  import dsss_pkg::*;
#(
  parameter int unsigned W = ACC_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] max,
  output logic         sel
);
  always_comb begin
    sel = (b > a);
    max = sel ? b : a;
  end
endmodule
