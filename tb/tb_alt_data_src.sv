// tb_alt_data_src: random data-clock strobes; the data bit must start at 0
// after reset, toggle exactly on the cycle after each strobe and hold
// otherwise.
module tb_alt_data_src;
  logic clk = 1'b0, rst = 1'b1, clk0 = 1'b0, data;
  int checks = 0, failures = 0;
  logic model;

  alt_data_src dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    model = 1'b0;
    repeat (500) begin
      checks++;
      if (data !== model) begin failures++; $display("FAIL data %0b expected %0b", data, model); end
      clk0 = ($urandom_range(4) == 0);
      @(negedge clk);
      if (clk0) model = ~model;
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
