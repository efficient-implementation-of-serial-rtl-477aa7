// tb_maxcorr: random sign streams whose agreement with the received stream
// is set per interval (from none to all samples), so both branch counts sweep
// across both thresholds.  The testbench counts agreements itself: the
// product of the inputs of cycle k enters the integrators in cycle k+1, the
// window counter starts at reset, and the decision for window j (cycles
// 180j .. 180j+179) must appear with dec_valid in cycle 180j+181.  It checks
// corr_max, corr_sel, acq_dec (max > VTH1 = 128), track_dec (max > VTH2 = 160), the det
// output and that dec_valid comes once every 180 cycles and nowhere else.
module tb_maxcorr;
  import dsss_pkg::*;
  logic clk = 1'b0, rst = 1'b1, rx_s = 1'b0, lc_s = 1'b0, dc_s = 1'b0;
  logic det, acq_dec, track_dec, dec_valid, corr_sel;
  logic [7:0] corr_max;
  int checks = 0, failures = 0;
  localparam int NWIN = 30;
  int cnt_l [NWIN+2], cnt_d [NWIN+2];
  int n_acq = 0, n_track = 0, n_none = 0, n_sel = 0;

  maxcorr dut (.*);
  always #5 clk = ~clk;

  initial begin
    int pl, pd, j, w;
    logic pdet_l, pdet_d;
    foreach (cnt_l[i]) begin cnt_l[i] = 0; cnt_d[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    pdet_l = 1'b0; pdet_d = 1'b0;          // reset value of the product registers
    pl = 100; pd = 100;
    for (int k = 0; k < 180 * NWIN + 5; k++) begin
      w = k / 180;
      // product entering the integrators in cycle k
      if (w < NWIN + 2) begin
        if (!pdet_l) cnt_l[w]++;
        if (!pdet_d) cnt_d[w]++;
      end
      // check det output (product of the inputs of cycle k-1)
      checks++;
      if (det !== pdet_l) begin failures++; $display("FAIL det at %0d", k); end
      // decisions
      checks++;
      if (dec_valid !== (k >= 181 && k % 180 == 1)) begin failures++; $display("FAIL dec_valid at %0d", k); end
      if (dec_valid) begin
        int mx;
        j  = (k - 181) / 180;
        mx = (cnt_d[j] > cnt_l[j]) ? cnt_d[j] : cnt_l[j];
        checks += 4;
        if (corr_max !== 8'(mx))              begin failures++; $display("FAIL win %0d max %0d expected %0d", j, corr_max, mx); end
        if (corr_sel !== (cnt_d[j] > cnt_l[j])) begin failures++; $display("FAIL win %0d sel", j); end
        if (acq_dec !== (mx > int'(VTH1)))           begin failures++; $display("FAIL win %0d acq", j); end
        if (track_dec !== (mx > int'(VTH2)))         begin failures++; $display("FAIL win %0d track", j); end
        if (track_dec) n_track++; else if (acq_dec) n_acq++; else n_none++;
        if (corr_sel) n_sel++;
      end
      // new agreement rates at each window start (in percent)
      if (k % 180 == 0) begin
        int rates [8] = '{0, 3, 10, 20, 30, 50, 80, 100};
        pl = rates[$urandom_range(7)];
        pd = rates[$urandom_range(7)];
      end
      rx_s = $urandom_range(1) == 1;
      lc_s = rx_s ^ (int'($urandom_range(99)) >= pl);
      dc_s = rx_s ^ (int'($urandom_range(99)) >= pd);
      pdet_l = rx_s ^ lc_s;
      pdet_d = rx_s ^ dc_s;
      @(negedge clk);
    end
    checks++;
    if (n_acq == 0 || n_track == 0 || n_none == 0 || n_sel == 0) begin
      failures++; $display("FAIL coverage %0d %0d %0d %0d", n_acq, n_track, n_none, n_sel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
