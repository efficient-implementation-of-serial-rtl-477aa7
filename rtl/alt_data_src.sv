// alt_data_src: alternating data source (1, 0, 1, 0, ...).
//
// The data bit toggles on every clock cycle where the data-clock strobe
// `clk0` is high; between strobes it holds.  Reset clears it to 0, so the
// first bit after the first strobe is 1.  Used both as the transmitter's
// data and as the receiver's local copy of it.
module alt_data_src (
  input  logic clk,
  input  logic rst,
  input  logic clk0,
  output logic data
);
  always_ff @(posedge clk) begin
    if (rst)       data <= 1'b0;
    else if (clk0) data <= ~data;
  end
endmodule
