// tb_choose_max: exhaustive over a grid plus random pairs; max must be the
// larger value and sel must be 1 exactly when b > a.
module tb_choose_max;
  logic [7:0] a, b, max;
  logic sel;
  int checks = 0, failures = 0;

  choose_max dut (.*);

  task automatic one(logic [7:0] x, logic [7:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (max !== ((x > y) ? x : y) || sel !== (y > x)) begin
      failures++;
      $display("FAIL a=%0d b=%0d max=%0d sel=%0b", x, y, max, sel);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i += 15) for (int j = 0; j < 256; j += 17) one(8'(i), 8'(j));
    for (int i = 0; i < 256; i++) one(8'(i), 8'(i));
    repeat (1000) one(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
