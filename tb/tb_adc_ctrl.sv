// tb_adc_ctrl: runs the converter interface against two behavioural
// converters loaded with random 16-bit values. For every conversion it checks
// both 12-bit samples (12 MSBs, MSB inverted from offset binary to two's
// complement), the number of sclk pulses inside one scs frame (22) and the
// latency from adc_start to adc_out_rdy (at most 3 cycles per bit plus 3).
`timescale 1ns/1ps
module tb_adc_ctrl;
  logic clk = 1'b0, reset = 1'b1;
  logic adc_clk = 1'b0, adc_start = 1'b0;
  logic sclk, scs, sdout1, sdout2, adc_out_rdy;
  logic signed [11:0] data1, data2;
  logic [15:0] v1 = '0, v2 = '0;
  int checks = 0, failures = 0;

  adc_ctrl dut (.clk, .reset, .adc_clk, .adc_start, .sclk, .scs, .sdout1, .sdout2,
                .data1, .data2, .adc_out_rdy);
  adc_model m1 (.sclk, .scs, .value(v1), .sdout(sdout1));
  adc_model m2 (.sclk, .scs, .value(v2), .sdout(sdout2));

  always #69.444 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic signed [11:0] expect_sample(input logic [15:0] v);
    return {~v[15], v[14:4]};
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pulses = 0;
  always @(posedge sclk) if (!scs) pulses++;

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    adc_clk <= ((cyc + 1) % 3 == 0);
  end

  initial begin
    int t0;
    repeat (4) @(posedge clk);
    reset <= 1'b0;
    check(scs === 1'b1, "scs idle high");
    for (int n = 0; n < 200; n++) begin
      v1 = 16'($urandom);
      v2 = 16'($urandom);
      if (n == 0) begin v1 = 16'h0000; v2 = 16'hFFFF; end
      if (n == 1) begin v1 = 16'h8000; v2 = 16'h7FFF; end
      repeat (1 + $urandom % 5) @(posedge clk);
      pulses = 0;
      adc_start <= 1'b1;
      @(posedge clk);
      adc_start <= 1'b0;
      t0 = cyc;
      while (!adc_out_rdy) @(posedge clk);
      check(cyc - t0 <= 3 * 22 + 3, $sformatf("latency %0d", cyc - t0));
      check(pulses == 22, $sformatf("22 sclk pulses per frame, saw %0d", pulses));
      check(data1 == expect_sample(v1), $sformatf("ch1 %h -> %h", v1, data1));
      check(data2 == expect_sample(v2), $sformatf("ch2 %h -> %h", v2, data2));
      @(posedge clk);
      check(scs === 1'b1 && !adc_out_rdy, "frame closed, ready is one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
