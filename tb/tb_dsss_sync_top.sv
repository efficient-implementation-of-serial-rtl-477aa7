// tb_dsss_sync_top: end-to-end test of the synchronization sub-system at its
// default parameters.
//
// The transmitter output is sent through a channel model made of a delay of
// D samples and additive noise (sum of four uniform variables on [-62, 62],
// sigma about 72 against an amplitude of 127: about 5 dB SNR and 4 % of the
// sample signs wrong), and fed back
// to the receiver; rx_clk0 is tx_clk0 delayed by the same D.  For several
// random delays the test waits for the serial search to lock (Acq_dec and
// Track_dec both 1), then checks the recovered data bit by bit against the
// transmitted bits (dout = 1 for a transmitted 0), the search rate (lock
// within 60 D + 3600 cycles: one 3-sample step per interval), the decision rate (one
// decision per 180 samples) and the dout latency (5 cycles after rx_clk0).
// It counts each mechanism: Tc/2 retards, Tc/6 retards, lock decisions, wins
// of each correlation branch, and noise sign errors the majority vote absorbed.
module tb_dsss_sync_top;
  import dsss_pkg::*;

  localparam int TRIALS      = 3;
  localparam int MAXD        = 1024;        // channel delay line length
  localparam int LOCK_LIMIT  = 200_000;     // cycles allowed to lock
  localparam int CHECK_BITS  = 150;         // data bits checked after lock
  localparam int NOISE_A     = 62;

  logic clk = 1'b0, rst = 1'b1;
  sample_t tx, rx, lc, dc, corr_max_s;
  logic tx_clk0, tx_data, rx_clk0, v_clk, slip, dout, dout_valid;
  logic acq_dec, track_dec, dec_valid, corr_sel, local_data;
  logic [ACC_W-1:0] corr_max;

  dsss_sync_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_acq_retard = 0, n_track_retard = 0, n_lock = 0, n_sel_dc = 0, n_sel_lc = 0;
  int n_noise_flips = 0, n_bits_ok = 0;

  // channel history, indexed by cycle modulo MAXD
  sample_t tx_hist   [MAXD];
  logic    clk0_hist [MAXD];
  logic    data_hist [MAXD];   // data bit carried by the tx sample of that cycle
  logic    txd_q;              // tx_data one cycle back = data of the current tx sample
  int      cyc = 0, D = 1, t_start = 0;  // channel output starts D cycles after t_start
  int      last_dec = -1, last_rxclk0 = -1000;
  logic    locked = 1'b0;
  logic    clean_sign;

  function automatic sample_t add_noise(sample_t s);
    int n, v;
    n = 0;
    for (int i = 0; i < 4; i++) n += int'($urandom_range(2 * NOISE_A)) - NOISE_A;
    v = int'(s) + n;
    if (v > 127)  v = 127;
    if (v < -128) v = -128;
    return sample_t'(v);
  endfunction

  // channel: rx(t) = tx(t - D) + noise, rx_clk0(t) = tx_clk0(t - D)
  always_comb begin
    rx      = (cyc - t_start >= D) ? add_noise_q : '0;
    rx_clk0 = (cyc - t_start >= D) ? clk0_hist[(cyc - D) % MAXD] : 1'b0;
  end
  sample_t add_noise_q;

  always @(negedge clk) begin
    tx_hist[cyc % MAXD]   = tx;
    clk0_hist[cyc % MAXD] = tx_clk0;
    data_hist[cyc % MAXD] = txd_q;
    if (cyc - t_start >= D) begin
      add_noise_q = add_noise(tx_hist[(cyc - D) % MAXD]);
      clean_sign  = tx_hist[(cyc - D) % MAXD] >= 0;
      if (locked && ((add_noise_q >= 0) != clean_sign)) n_noise_flips++;
    end else add_noise_q = '0;
  end

  always @(posedge clk) begin
    txd_q <= tx_data;
    cyc   <= cyc + 1;
  end

  // decision-rate and mechanism monitor
  always @(posedge clk) if (!rst) begin
    if (rx_clk0) last_rxclk0 = cyc;
    if (dec_valid) begin
      if (last_dec >= 0) begin
        checks++;
        if (cyc - last_dec != WIN_SAMPLES) begin
          failures++;
          $display("FAIL decision interval %0d", cyc - last_dec);
        end
      end
      last_dec = cyc;
      if (corr_sel) n_sel_dc++; else n_sel_lc++;
      if ($test$plusargs("verbose")) $display("%0d dec max=%0d sel=%0d", cyc, corr_max, corr_sel);
    end
  end
  always @(posedge clk) if (!rst && dec_valid) begin
    #1;
    if (!acq_dec)        n_acq_retard++;
    else if (!track_dec) n_track_retard++;
    else                 n_lock++;
  end

  task automatic run_trial(int delay);
    int t0, bits, errs;
    logic exp_bit;
    D = delay;
    rst = 1'b1; locked = 1'b0; last_dec = -1;
    repeat (4) @(posedge clk);
    @(negedge clk);
    t_start = cyc;
    rst = 1'b0;
    t0 = cyc;
    // wait for lock: three consecutive lock decisions
    begin
      int run = 0;
      while (run < 3 && cyc - t0 < LOCK_LIMIT) begin
        @(posedge clk);
        if (dec_valid) begin
          #1;
          run = (acq_dec && track_dec) ? run + 1 : 0;
        end
      end
    end
    checks++;
    if (cyc - t0 >= LOCK_LIMIT) begin
      failures++;
      $display("FAIL delay %0d: no lock within %0d cycles", delay, LOCK_LIMIT);
      return;
    end
    $display("delay %0d: locked after %0d cycles (corr_max %0d)", delay, cyc - t0, corr_max);
    // search rate: the local code must be retarded by D samples, 3 samples
    // per 180-cycle interval, plus a few intervals of fine steps and the
    // three lock decisions
    checks++;
    if (cyc - t0 > 60 * delay + 180 * 20) begin
      failures++;
      $display("FAIL delay %0d: lock took %0d cycles, bound %0d", delay, cyc - t0, 60 * delay + 180 * 20);
    end
    locked = 1'b1;
    // skip one bit, then check CHECK_BITS bits
    bits = 0; errs = 0;
    @(posedge clk iff dout_valid);
    while (bits < CHECK_BITS) begin
      @(posedge clk iff dout_valid);
      // latency: 5 cycles after rx_clk0
      checks++;
      if (cyc - last_rxclk0 != 5) begin
        failures++;
        $display("FAIL dout latency %0d", cyc - last_rxclk0);
      end
      // finished bit: its last sample was at rx in cycle cyc-4
      exp_bit = ~data_hist[(cyc - 4 - D) % MAXD];
      checks++;
      if (dout !== exp_bit) begin
        errs++;
        failures++;
        $display("FAIL delay %0d bit %0d: dout %0b expected %0b", delay, bits, dout, exp_bit);
      end else n_bits_ok++;
      bits++;
    end
    locked = 1'b0;
  endtask

  initial begin
    int delays [TRIALS];
    delays[0] = 1 + int'($urandom_range(760));
    delays[1] = 1 + int'($urandom_range(760));
    delays[2] = 3;
    if ($value$plusargs("delay=%d", delays[0])) ;
    foreach (delays[i]) run_trial(delays[i]);
    $display("mechanisms: acq_retard=%0d track_retard=%0d lock=%0d dc_wins=%0d lc_wins=%0d noise_flips_absorbed=%0d bits_ok=%0d",
             n_acq_retard, n_track_retard, n_lock, n_sel_dc, n_sel_lc, n_noise_flips, n_bits_ok);
    checks += 6;
    if (n_acq_retard   == 0) begin failures++; $display("FAIL no Tc/2 retard"); end
    if (n_track_retard == 0) begin failures++; $display("FAIL no Tc/6 retard"); end
    if (n_lock         == 0) begin failures++; $display("FAIL no lock decision"); end
    if (n_sel_dc       == 0) begin failures++; $display("FAIL data branch never won"); end
    if (n_sel_lc       == 0) begin failures++; $display("FAIL code branch never won"); end
    if (n_noise_flips  == 0) begin failures++; $display("FAIL no noise sign errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
