// ds_ss_tx: DS/SS transmitter used as the signal source of the system.
//
// Alternating data at 100 kb/s is EX-ORed with the 127-chip PN code at
// 1 Mchip/s and BPSK mapped to 8-bit samples at the 6 MHz sample clock.
// A sample counter makes the chip clock (every SPC samples) and a chip
// counter makes the data clock `clk0` (every DATA_CHIPS chips), so data
// boundaries fall on chip boundaries.  The spreading itself reuses the
// local code generator (its dc output is exactly BPSK(PN xor data)).
// Outputs: `tx` samples, the data clock strobe `clk0` (one cycle, two cycles
// ahead of the first sample of the new bit at `tx`) and the current `data`
// bit.  Rates follow the specification.
module ds_ss_tx
  import dsss_pkg::*;
#(
  parameter int unsigned SPC_P        = SPC,
  parameter int unsigned DATA_CHIPS_P = DATA_CHIPS
) (
  input  logic    clk,
  input  logic    rst,
  output sample_t tx,
  output logic    clk0,
  output logic    data
);
  localparam int unsigned PW = $clog2(SPC_P);
  localparam int unsigned CW = $clog2(DATA_CHIPS_P);

  logic [PW-1:0] phase;
  logic [CW-1:0] chip_no;
  logic          chip_en;
  sample_t       lc_unused;

  assign chip_en = (phase == PW'(SPC_P - 1));
  assign clk0    = chip_en && (chip_no == CW'(DATA_CHIPS_P - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= '0;
      chip_no <= '0;
    end else begin
      phase <= chip_en ? '0 : phase + 1'b1;
      if (chip_en) chip_no <= (chip_no == CW'(DATA_CHIPS_P - 1)) ? '0 : chip_no + 1'b1;
    end
  end

  local_code_gen u_gen (.clk, .rst, .clk0, .v_clk(chip_en), .lc(lc_unused), .dc(tx), .altdata(data));
endmodule
