// vclk_gen: variable chip clock (v_clk) for the local code generator, which
// carries out the serial search.
//
// A sample-phase counter runs 0 .. SPC-1 and `v_clk` is high in the cycle the
// counter wraps, so the local code normally advances one chip every SPC
// samples, exactly like the transmitter.  At the end of each correlation
// interval (`dec_valid`) the detector's decisions select a retard:
//   Acq_dec = 0                 -> retard by Tc/2 (SPC/2 samples, search step)
//   Acq_dec = 1, Track_dec = 0  -> retard by Tc/6 (SPC/6 samples, fine step)
//   both 1                      -> no change (locked)
// A retard of k samples freezes the phase counter for k cycles, which delays
// every later v_clk pulse, and so the local code, by k samples.  `slip` is high
// while the counter is frozen.  The two step sizes follow the specification;
// realising v_clk as a clock enable that skips samples is this design's own
// choice (all logic is on the one sample clock).
module vclk_gen
  import dsss_pkg::*;
#(
  parameter int unsigned SPC_P = SPC
) (
  input  logic clk,
  input  logic rst,
  input  logic dec_valid,
  input  logic acq_dec,
  input  logic track_dec,
  output logic v_clk,
  output logic slip
);
  localparam int unsigned PW = $clog2(SPC_P);
  localparam int unsigned HW = $clog2(SPC_P/2 + 1);
  localparam logic [HW-1:0] HOLD_ACQ   = HW'(SPC_P / 2);
  localparam logic [HW-1:0] HOLD_TRACK = HW'((SPC_P / 6 > 0) ? SPC_P / 6 : 1);

  logic [PW-1:0] phase;
  logic [HW-1:0] hold;

  assign slip  = (hold != '0);
  assign v_clk = !slip && (phase == PW'(SPC_P - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      hold  <= '0;
    end else begin
      if (slip) hold <= hold - 1'b1;
      else      phase <= (phase == PW'(SPC_P - 1)) ? '0 : phase + 1'b1;
      if (dec_valid) begin
        if (!acq_dec)        hold <= HOLD_ACQ;
        else if (!track_dec) hold <= HOLD_TRACK;
      end
    end
  end

  // A new decision must not arrive while a retard is still being applied.
  a_no_overlap: assert property (@(posedge clk) disable iff (rst) dec_valid |-> !slip);
endmodule
