// tb_vclk_gen: the chip clock must pulse every 6 samples when no retard is
// requested; after a decision with Acq_dec = 0 the next gap must be 6 + 3
// samples (Tc/2), with Acq_dec = 1 and Track_dec = 0 it must be 6 + 1 (Tc/6),
// and with both 1 it must stay 6.  Decisions arrive at random phases.
module tb_vclk_gen;
  logic clk = 1'b0, rst = 1'b1, dec_valid = 1'b0, acq_dec = 1'b0, track_dec = 1'b0;
  logic v_clk, slip;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1, extra = 0;
  int n_acq = 0, n_track = 0;

  vclk_gen dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) cyc <= cyc + 1;

  // gap checker
  always @(posedge clk) if (!rst && v_clk) begin
    if (last >= 0) begin
      checks++;
      if (cyc - last != 6 + extra) begin
        failures++;
        $display("FAIL gap %0d expected %0d", cyc - last, 6 + extra);
      end
      extra = 0;
    end
    last = cyc;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    repeat (60) begin
      // wait a random time, away from a pulse, then issue a decision
      repeat (20 + int'($urandom_range(5))) @(negedge clk);
      while (v_clk || slip) @(negedge clk);
      acq_dec   = $urandom_range(2) != 0;
      track_dec = $urandom_range(1) != 0;
      dec_valid = 1'b1;
      extra     = !acq_dec ? 3 : (!track_dec ? 1 : 0);
      if (!acq_dec) n_acq++; else if (!track_dec) n_track++;
      @(negedge clk);
      dec_valid = 1'b0;
    end
    repeat (20) @(negedge clk);
    checks++;
    if (n_acq == 0 || n_track == 0) failures++;
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
