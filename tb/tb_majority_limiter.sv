// tb_majority_limiter: data periods of random length (up to 1800 samples)
// with a random share of det = 1 samples.  After each bit_start, dout must be
// 1 if the finished period had more det = 0 samples, 0 if it had more det = 1
// samples, and unchanged on a tie; dout_valid must pulse one cycle after
// bit_start.  Periods with exact ties and a 1800-sample period are included.
module tb_majority_limiter;
  logic clk = 1'b0, rst = 1'b1, det = 1'b0, bit_start = 1'b0, dout, dout_valid;
  int checks = 0, failures = 0;

  majority_limiter dut (.*);
  always #5 clk = ~clk;

  initial begin
    int len, cp, cm, thr;
    logic exp = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // first period starts with a strobe
    for (int k = 0; k < 60; k++) begin
      len = (k == 5) ? 1800 : ((k % 7 == 3) ? 40 : 20 + int'($urandom_range(100)));
      thr = int'($urandom_range(100));
      cp = 0; cm = 0;
      for (int i = 0; i < len; i++) begin
        bit_start = (i == 0);
        if (k % 7 == 3) det = i[0];                 // exact tie
        else            det = int'($urandom_range(99)) < thr;
        if (det) cm++; else cp++;
        @(negedge clk);
        if (i == 0 && k > 0) begin
          checks++;
          if (dout_valid !== 1'b1 || dout !== exp) begin
            failures++;
            $display("FAIL period %0d: dout %0b valid %0b expected %0b", k - 1, dout, dout_valid, exp);
          end
        end else begin
          checks++;
          if (dout_valid !== (i == 0)) begin failures++; $display("FAIL stray dout_valid"); end
        end
      end
      if (cp > cm) exp = 1'b1; else if (cp < cm) exp = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
