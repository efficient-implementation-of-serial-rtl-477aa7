// tb_bpsk_mod: random chip bits; each sample must be +127 for a 1 and -127
// for a 0, one cycle after the bit is applied.
module tb_bpsk_mod;
  logic clk = 1'b0, rst = 1'b1, bit_in = 1'b0;
  logic signed [7:0] sample;
  int checks = 0, failures = 0;
  logic prev;

  bpsk_mod dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (sample !== 8'sd0) begin failures++; $display("FAIL reset value %0d", sample); end
    rst = 1'b0;
    repeat (300) begin
      prev   = bit_in;
      bit_in = $urandom_range(1) == 1;
      @(negedge clk);
      checks++;
      if (sample !== (bit_in ? 8'sd127 : -8'sd127)) begin
        failures++;
        $display("FAIL bit %0b gave %0d", bit_in, sample);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
