// tb_ds_ss_tx: the transmitter is checked cycle by cycle against a model
// written from the system numbers alone: counting cycles k from reset, the
// chip index is k/6, the data bit is (k/60) mod 2, clk0 is high when
// k mod 60 = 59, the chips follow x^7 + x^6 + 1 from the all-ones seed, and
// the sample at cycle k is +127 for (chip xor data) = 1 and -127 otherwise,
// taken from the state of cycle k-1.  Two code periods are covered.
module tb_ds_ss_tx;
  import dsss_pkg::*;
  logic clk = 1'b0, rst = 1'b1, clk0, data;
  sample_t tx;
  int checks = 0, failures = 0;
  logic chips [300];
  int n_clk0 = 0;

  ds_ss_tx dut (.*);
  always #5 clk = ~clk;

  function automatic logic bit_at(int k);
    return chips[k / 6] ^ logic'((k / 60) % 2);
  endfunction

  initial begin
    for (int i = 0; i < 300; i++) chips[i] = (i < 7) ? 1'b1 : (chips[i-6] ^ chips[i-7]);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 127 * 6 * 2 + 10; k++) begin
      checks += 2;
      if (clk0 !== (k % 60 == 59)) begin failures++; $display("FAIL clk0 at %0d", k); end
      if (clk0) n_clk0++;
      if (data !== logic'((k / 60) % 2)) begin failures++; $display("FAIL data at %0d", k); end
      if (k >= 1) begin
        checks++;
        if (tx !== (bit_at(k - 1) ? 8'sd127 : -8'sd127)) begin
          failures++; $display("FAIL tx at %0d: %0d", k, tx);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_clk0 != 25) begin failures++; $display("FAIL %0d data clocks", n_clk0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
