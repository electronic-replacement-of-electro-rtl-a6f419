// tb_threshold: walks the rail amplitude and the phase difference through
// and across the hysteresis bands and checks the two decision flags and the
// registered phase difference against a reference model written here from
// the rules: amplitude sets at >= 30000 and clears below 24000; the phase
// difference sets inside [91, 165] and clears outside [85, 171] (1/512 turn
// units); in between both hold. Also checks that nothing changes without
// th_en, and the wrap-around of the 9-bit difference.
`timescale 1ns/1ps
module tb_threshold;
  logic clk = 1'b0, reset = 1'b1, th_en = 1'b0;
  logic [19:0] rail_amp = '0;
  logic signed [8:0] ref_phase = '0, rail_phase = '0, delta;
  logic amp_ok, phase_ok;
  int checks = 0, failures = 0;

  threshold dut (.clk, .reset, .th_en, .rail_amp, .ref_phase, .rail_phase, .amp_ok, .phase_ok, .delta);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit m_amp = 0, m_ph = 0;
  int hold_amp = 0, hold_ph = 0;

  task automatic step(input int amp, input int refp, input int railp, input bit en = 1);
    int d;
    @(negedge clk);
    rail_amp = 20'(amp); ref_phase = 9'(refp); rail_phase = 9'(railp); th_en = en;
    d = ((railp - refp) % 512 + 512 + 256) % 512 - 256;
    if (en) begin
      if (amp >= 30000) m_amp = 1;
      else if (amp < 24000) m_amp = 0;
      else hold_amp++;
      if (d >= 91 && d <= 165) m_ph = 1;
      else if (d < 85 || d > 171) m_ph = 0;
      else hold_ph++;
    end
    @(negedge clk);
    th_en = 0;
    check(amp_ok == m_amp, $sformatf("amp_ok for %0d", amp));
    check(phase_ok == m_ph, $sformatf("phase_ok for d=%0d", d));
    if (en) check(delta == 9'(d), $sformatf("delta %0d want %0d", delta, d));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(!amp_ok && !phase_ok, "reset state is occupied");
    reset = 0;
    // amplitude ramps up and down through the band, phase fixed inside
    for (int a = 0; a <= 40000; a += 1000) step(a, 10, 138);
    for (int a = 40000; a >= 0; a -= 1000) step(a, 10, 138);
    // exact threshold values
    step(29999, 0, 128); step(30000, 0, 128); step(24000, 0, 128); step(23999, 0, 128);
    // phase difference sweeps across the window, with wrap-around of the operands
    for (int d = 60; d <= 200; d++) step(35000, 200, 200 + d);
    for (int d = 200; d >= 60; d--) step(35000, -250, -250 + d);
    // no update without th_en
    step(35000, 0, 128);
    step(0, 0, 0, 0);
    step(0, 0, 0, 0);
    check(hold_amp > 5 && hold_ph > 10, "both hysteresis bands were exercised");
    for (int n = 0; n < 2000; n++) step($urandom % 45000, $urandom % 512, $urandom % 512, $urandom % 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
