// tb_clock_gen: checks the periods of the converter bit-clock enable and the
// sampling strobe (3 and 2000 cycles of the 7.2 MHz clock) at the default
// frequencies, that the bit enable restarts with every sampling strobe (the
// bit period ending at a strobe is 2000 mod 3 = 2 cycles), and that both are
// quiet during reset.
`timescale 1ns/1ps
module tb_clock_gen;
  logic clk = 1'b0, reset = 1'b1;
  logic adc_clk, adc_start;
  int checks = 0, failures = 0;

  clock_gen dut (.clk, .reset, .adc_clk, .adc_start);

  always #69.444 clk = ~clk;   // 7.2 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_bit = -1, last_smp = -1, nbit = 0, nsmp = 0;

  initial begin
    repeat (5) begin
      @(posedge clk); #1;
      check(!adc_clk && !adc_start, "strobes quiet in reset");
    end
    reset = 1'b0;
    repeat (8005) begin
      @(posedge clk); #1;   // sample outputs of the cycle that just began
      cyc++;
    end
    check(nbit > 2600, "enough bit enables seen");
    check(nsmp == 5, $sformatf("5 sampling strobes in 8000 cycles, saw %0d", nsmp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count distances between enables, measured in cycles of clk
  int t = 0;
  always @(posedge clk) begin
    if (!reset) begin
      if (adc_clk) begin
        if (last_bit >= 0)
          check(t - last_bit == (adc_start ? 2 : 3), $sformatf("adc_clk period %0d", t - last_bit));
        last_bit = t;
        nbit++;
      end
      if (adc_start) begin
        check(adc_clk, "bit enable coincides with the sampling strobe");
        if (last_smp >= 0) check(t - last_smp == 2000, $sformatf("adc_start period %0d", t - last_smp));
        last_smp = t;
        nsmp++;
      end
      t++;
    end
  end
endmodule
