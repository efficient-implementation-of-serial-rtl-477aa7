// maxcorr: correlation and decision part of the one-bit detector.
//
// Inputs are the sign bits (1 = positive) of the received signal and of the
// two local references.  Two one-bit multipliers (EX-OR, output 0 for a
// positive product) are registered; `det` is the received x lc product used
// by the data limiter.  Each product feeds an integrator that counts positive
// products over a correlation interval of WIN samples, counted by a free
// running window counter.  At the end of an interval the larger count is
// chosen and compared against two thresholds:
//   acq_dec   = max > VTH1   (acquisition)
//   track_dec = max > VTH2   (tracking)
// The decisions, the winning count `corr_max` and the winning branch
// `corr_sel` (1 = data branch) are registered and held; `dec_valid` pulses
// once per interval, 3 cycles after the last sample of the interval entered
// the multipliers.  Structure follows the specification; the threshold values
// are this design's choice.
module maxcorr
  import dsss_pkg::*;
#(
  parameter int unsigned WIN  = WIN_SAMPLES,
  parameter int unsigned W    = ACC_W,
  parameter int unsigned TH1  = VTH1,
  parameter int unsigned TH2  = VTH2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         rx_s,
  input  logic         lc_s,
  input  logic         dc_s,
  output logic         det,
  output logic         acq_dec,
  output logic         track_dec,
  output logic         dec_valid,
  output logic [W-1:0] corr_max,
  output logic         corr_sel
);
  localparam int unsigned NW = $clog2(WIN);

  logic          det_d;      // received x dc product
  logic [NW-1:0] n;          // sample index within the interval
  logic          dump;
  logic [W-1:0]  sum_l, sum_d, mx;
  logic          v_l, v_d, sel;

  always_ff @(posedge clk) begin
    if (rst) begin
      det   <= 1'b0;
      det_d <= 1'b0;
      n     <= '0;
    end else begin
      det   <= rx_s ^ lc_s;
      det_d <= rx_s ^ dc_s;
      n     <= (n == NW'(WIN - 1)) ? '0 : n + 1'b1;
    end
  end

  assign dump = (n == NW'(WIN - 1));

  mf_integrator #(.W(W)) u_int_l (.clk, .rst, .det(det),   .dump, .sum(sum_l), .sum_valid(v_l));
  mf_integrator #(.W(W)) u_int_d (.clk, .rst, .det(det_d), .dump, .sum(sum_d), .sum_valid(v_d));

  choose_max #(.W(W)) u_max (.a(sum_l), .b(sum_d), .max(mx), .sel);

  always_ff @(posedge clk) begin
    if (rst) begin
      acq_dec   <= 1'b0;
      track_dec <= 1'b0;
      dec_valid <= 1'b0;
      corr_max  <= '0;
      corr_sel  <= 1'b0;
    end else begin
      dec_valid <= v_l;
      if (v_l) begin
        acq_dec   <= (mx > W'(TH1));
        track_dec <= (mx > W'(TH2));
        corr_max  <= mx;
        corr_sel  <= sel;
      end
    end
  end

  a_branches_in_step: assert property (@(posedge clk) disable iff (rst) v_l == v_d);
endmodule
