// tb_esb: random 8-bit samples (including 0, -128 and 127); the sign bit must
// be 1 for x >= 0 and 0 for x < 0, one cycle later.
module tb_esb;
  logic clk = 1'b0, rst = 1'b1, s;
  logic signed [7:0] x = '0;
  int checks = 0, failures = 0;

  esb dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic signed [7:0] vals [3] = '{8'sd0, -8'sd128, 8'sd127};
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      x = (i < 3) ? vals[i] : 8'($urandom);
      @(negedge clk);
      checks++;
      if (s !== (x >= 0)) begin failures++; $display("FAIL x=%0d s=%0b", x, s); end
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
