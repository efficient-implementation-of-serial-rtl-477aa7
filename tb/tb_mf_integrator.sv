// tb_mf_integrator: random products and random interval lengths (up to 180);
// at each dump the sum must equal the number of det = 0 samples in the
// interval, including the dump sample, and sum_valid must pulse one cycle
// after the dump.
module tb_mf_integrator;
  logic clk = 1'b0, rst = 1'b1, det = 1'b0, dump = 1'b0, sum_valid;
  logic [7:0] sum;
  int checks = 0, failures = 0;

  mf_integrator dut (.*);
  always #5 clk = ~clk;

  initial begin
    int len, cnt;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 40; k++) begin
      len = (k == 0) ? 180 : 1 + int'($urandom_range(179));
      cnt = 0;
      for (int i = 0; i < len; i++) begin
        det  = (k == 1) ? 1'b0 : ($urandom_range(2) == 0);
        dump = (i == len - 1);
        if (!det) cnt++;
        @(negedge clk);
        checks++;
        if (sum_valid !== dump) begin failures++; $display("FAIL sum_valid"); end
      end
      dump = 1'b0;
      checks++;
      if (sum !== 8'(cnt)) begin failures++; $display("FAIL interval %0d: sum %0d expected %0d", k, sum, cnt); end
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
