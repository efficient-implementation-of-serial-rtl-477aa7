// tb_proposed_detector: 8-bit samples in, decisions and data out.  The local
// references lc and dc are random +/-127 signals; rx is lc multiplied by a
// data bit that changes at random bit boundaries (marked with bit_start),
// with random magnitudes and a share of sign errors, while dc agrees with rx
// at a rate set per interval.  The testbench reduces all samples to signs
// itself and checks: the decision of each 180-sample window (acq > VTH1 = 128,
// track > VTH2 = 160, max, branch) two ESB/multiplier stages later, and each dout
// against the majority of the rx x lc signs over the finished bit, three
// cycles after the bit_start of the next bit.
module tb_proposed_detector;
  import dsss_pkg::*;
  logic clk = 1'b0, rst = 1'b1, bit_start = 1'b0;
  sample_t rx = '0, lc = '0, dc = '0;
  logic dout, dout_valid, acq_dec, track_dec, dec_valid, corr_sel;
  logic [7:0] corr_max;
  int checks = 0, failures = 0;
  localparam int NWIN = 20;
  int cnt_l [NWIN+2], cnt_d [NWIN+2];
  int n_dout = 0, n_dec = 0, n_track = 0;

  proposed_detector dut (.*);
  always #5 clk = ~clk;

  function automatic sample_t mag(logic positive);
    int m = 1 + int'($urandom_range(126));
    return positive ? sample_t'(m) : sample_t'(-m);
  endfunction

  initial begin
    int pd, w, bit_left, cp, cm, pend_at;
    logic data, exp_dout, pend;
    // products entering integrators/limiter: index by cycle, 2-stage pipeline
    logic pl_q [3], pd_q [3], bs_q [3];
    foreach (cnt_l[i]) begin cnt_l[i] = 0; cnt_d[i] = 0; end
    foreach (pl_q[i]) begin pl_q[i] = 1'b0; pd_q[i] = 1'b0; bs_q[i] = 1'b0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    pd = 100; bit_left = 0; data = 1'b0; cp = 0; cm = 0; exp_dout = 1'b0; pend = 1'b0; pend_at = 0;
    for (int k = 0; k < 180 * NWIN + 5; k++) begin
      w = k / 180;
      // products of cycle k are those of the inputs of cycle k-2 (pl_q[1])
      if (w < NWIN + 2) begin
        if (!pl_q[1]) cnt_l[w]++;
        if (!pd_q[1]) cnt_d[w]++;
      end
      // limiter model: a delayed strobe closes the running period
      if (bs_q[1]) begin
        if (cp > cm) exp_dout = 1'b1; else if (cp < cm) exp_dout = 1'b0;
        pend = 1'b1; pend_at = k + 1;
        cp = 0; cm = 0;
      end
      if (pl_q[1]) cm++; else cp++;
      if (pend && k == pend_at) begin
        pend = 1'b0;
        checks += 2;
        if (dout_valid !== 1'b1) begin failures++; $display("FAIL no dout_valid at %0d", k); end
        if (dout !== exp_dout)   begin failures++; $display("FAIL dout at %0d", k); end
        n_dout++;
      end
      if (dec_valid) begin
        int j, mx;
        j  = (k - 181) / 180;
        mx = (cnt_d[j] > cnt_l[j]) ? cnt_d[j] : cnt_l[j];
        checks += 5;
        if (k < 181 || (k - 181) % 180 != 0) begin failures++; $display("FAIL dec_valid at %0d", k); end
        if (corr_max !== 8'(mx))                begin failures++; $display("FAIL win %0d max %0d exp %0d", j, corr_max, mx); end
        if (corr_sel !== (cnt_d[j] > cnt_l[j])) begin failures++; $display("FAIL win %0d sel", j); end
        if (acq_dec !== (mx > int'(VTH1)))             begin failures++; $display("FAIL win %0d acq", j); end
        if (track_dec !== (mx > int'(VTH2)))           begin failures++; $display("FAIL win %0d track", j); end
        n_dec++;
        if (track_dec) n_track++;
      end
      // stimulus for cycle k
      if (k % 180 == 0) begin
        int rates [5] = '{0, 50, 90, 97, 100};
        pd = rates[$urandom_range(4)];
      end
      if (bit_left == 0) begin
        bit_left  = 30 + int'($urandom_range(60));
        data      = $urandom_range(1) == 1;
        bit_start = 1'b1;
      end else bit_start = 1'b0;
      bit_left--;
      begin
        logic ls, rs, ds;
        ls = $urandom_range(1) == 1;
        rs = ls ^ ~data ^ (int'($urandom_range(99)) < 10);   // 10 % sign errors
        ds = rs ^ (int'($urandom_range(99)) >= pd);
        lc = ls ? 8'sd127 : -8'sd127;
        rx = mag(rs);
        dc = ds ? 8'sd127 : -8'sd127;
        if ($urandom_range(20) == 0) rx = '0;                 // zero counts as positive
        // rx sign as the ESB sees it
        rs = (rx >= 0);
        pl_q[1] = pl_q[0]; pd_q[1] = pd_q[0]; bs_q[1] = bs_q[0];
        pl_q[0] = rs ^ ls;
        pd_q[0] = rs ^ ds;
        bs_q[0] = bit_start;
      end
      @(negedge clk);
    end
    checks++;
    if (n_dout < 20 || n_dec < NWIN - 1 || n_track == 0) begin
      failures++; $display("FAIL coverage %0d %0d %0d", n_dout, n_dec, n_track);
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
