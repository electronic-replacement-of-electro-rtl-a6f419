// tb_coef_rom: reads the whole coefficient table in one pass (rom_reset, then
// 719 x rom_en) and compares every cosine and sine entry with values computed
// here at run time from the Kaiser window (beta = 2, I0 summed to 40 terms)
// and the 75 Hz bin (K = 15 of 720). Entries may differ by one LSB from the
// reference to allow for rounding at exact halves. Also checks the wrap from
// entry 719 back to entry 0 and that a second rom_reset restarts the table.
`timescale 1ns/1ps
module tb_coef_rom;
  localparam int N = 720, K = 15;
  logic clk = 1'b0, rom_reset = 1'b0, rom_en = 1'b0;
  logic signed [9:0] cos_data, sin_data;
  int checks = 0, failures = 0;

  coef_rom dut (.clk, .rom_reset, .rom_en, .cos_data, .sin_data);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real i0(input real x);
    real s = 1.0, t = 1.0;
    for (int m = 1; m <= 40; m++) begin t *= (x * x) / (4.0 * m * m); s += t; end
    return s;
  endfunction

  function automatic int ref_coef(input int i, input bit sine);
    real w, a, u;
    u = (2.0 * i - (N - 1)) / (N - 1);
    w = i0(2.0 * $sqrt(1.0 - u * u)) / i0(2.0);
    a = 2.0 * 3.141592653589793 * ((K * i) % N) / N;
    return $rtoi($floor(511.0 * w * (sine ? $sin(a) : $cos(a)) + 0.5));
  endfunction

  function automatic bit close(input int got, input int want);
    return (got - want <= 1) && (want - got <= 1);
  endfunction

  initial begin
    int maxc = 0;
    @(negedge clk);
    rom_reset = 1;
    @(negedge clk);
    rom_reset = 0; rom_en = 1;
    for (int i = 0; i < N; i++) begin
      check(close(cos_data, ref_coef(i, 0)), $sformatf("cos[%0d] = %0d, want %0d", i, cos_data, ref_coef(i, 0)));
      check(close(sin_data, ref_coef(i, 1)), $sformatf("sin[%0d] = %0d, want %0d", i, sin_data, ref_coef(i, 1)));
      if (cos_data > maxc) maxc = cos_data;
      @(negedge clk);
    end
    // after the last entry the address has wrapped to entry 0
    check(close(cos_data, ref_coef(0, 0)), "wrap to entry 0");
    check(maxc >= 500, "window reaches full scale in the middle");
    // hold: no enable, outputs keep their value
    rom_en = 0;
    repeat (3) @(negedge clk);
    check(close(cos_data, ref_coef(0, 0)), "outputs hold without rom_en");
    rom_en = 1; repeat (5) @(negedge clk);
    rom_en = 0; rom_reset = 1; @(negedge clk); rom_reset = 0;
    check(close(cos_data, ref_coef(0, 0)) && close(sin_data, ref_coef(0, 1)), "rom_reset restarts at 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
