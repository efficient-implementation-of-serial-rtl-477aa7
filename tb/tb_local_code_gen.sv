// tb_local_code_gen: random v_clk and clk0 enables.  The testbench keeps its
// own model of the code (the x^7 + x^6 + 1 recurrence, starting from the all-ones
// reset seed) and of the alternating data, and checks that one cycle after
// each state change lc = +/-127 carries the code and dc = +/-127 carries
// code xor data.
module tb_local_code_gen;
  import dsss_pkg::*;
  logic clk = 1'b0, rst = 1'b1, clk0 = 1'b0, v_clk = 1'b0, altdata;
  sample_t lc, dc;
  int checks = 0, failures = 0;
  logic chips [1000];
  int nchip = 0;
  logic d_model = 1'b0;
  logic code_prev, data_prev;   // model state of the previous cycle

  local_code_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      // model state now: reset seed is all ones, so the first 7 chips are 1
      chips[nchip] = (nchip < 7) ? 1'b1 : (chips[nchip-6] ^ chips[nchip-7]);
      // outputs now show the state registered at the previous edge
      if (t >= 1) begin
        checks += 2;
        if (lc !== (code_prev ? 8'sd127 : -8'sd127)) begin
          failures++; $display("FAIL t=%0d lc=%0d", t, lc);
        end
        if (dc !== ((code_prev ^ data_prev) ? 8'sd127 : -8'sd127)) begin
          failures++; $display("FAIL t=%0d dc=%0d", t, dc);
        end
      end
      code_prev = chips[nchip];
      data_prev = d_model;
      v_clk = ($urandom_range(2) == 0);
      clk0  = ($urandom_range(9) == 0);
      @(negedge clk);
      if (v_clk && nchip < 999) nchip++;
      if (clk0) d_model = ~d_model;
    end
    checks++;
    if (nchip < 300) failures++;
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
