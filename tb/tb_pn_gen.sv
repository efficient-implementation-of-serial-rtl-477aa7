// tb_pn_gen: checks the PN generator against the properties of a 127-chip
// m-sequence worked out independently of the RTL: the chip stream obeys the
// recurrence c[n+7] = c[n+1] xor c[n] of x^7 + x^6 + 1, repeats after exactly
// 127 chips and not after any divisor, holds 64 ones and 63 zeros per period,
// and does not advance while `en` is low.
module tb_pn_gen;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, chip;
  int checks = 0, failures = 0;
  logic seq [400];
  int n = 0;

  pn_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int ones;
    logic held;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // collect 300 chips with random gaps in en
    while (n < 300) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      if (en) begin seq[n] = chip; n++; end
      else begin
        held = chip;
        @(negedge clk);
        check(chip == held, "chip changed while en low");
        en = 1'b0;
      end
    end
    for (int i = 0; i + 7 < 300; i++)
      check(seq[i+7] == (seq[i+1] ^ seq[i]), $sformatf("recurrence at %0d", i));
    for (int i = 0; i < 127; i++) check(seq[i] == seq[i+127], $sformatf("period at %0d", i));
    begin
      bit same = 1'b1;
      for (int i = 0; i < 127; i++) if (seq[i] != seq[(i+1) % 127]) same = 1'b0;
      check(!same, "sequence is constant");
    end
    ones = 0;
    for (int i = 0; i < 127; i++) ones += int'(seq[i]);
    check(ones == 64, $sformatf("balance: %0d ones", ones));
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
