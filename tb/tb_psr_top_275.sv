// tb_psr_top_275: the relay built for a 275 Hz track circuit (K_BIN = 55,
// bin 55 of 720 at 3.6 kHz). A 275 Hz reference and rail signal are fed in:
// the relay must pull 504 sample periods after the decision turns to free,
// and drop 360 periods after a shunt. A 75 Hz rail signal of the same
// amplitude (the frequency of the other kind of track circuit) must not be
// taken for a free track. Each situation is counted; one that never
// happened counts as a failure.
`timescale 1ns/1ps
module tb_psr_top_275;
  import psr_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  logic sclk, scs, sdout1, sdout2, efcp_out, amp_ok, phase_ok;
  logic [15:0] pull = 16'd504;
  amp_t   rail_amp, ref_amp;
  phase_t rail_phase, ref_phase, delta;
  state_t state;
  logic [15:0] v1 = 16'h8000, v2 = 16'h8000;
  int checks = 0, failures = 0;

  psr_top #(.K_BIN(55)) dut (.clk, .reset, .sclk, .scs, .sdout1, .sdout2, .pull, .efcp_out,
               .rail_amp, .ref_amp, .rail_phase, .ref_phase, .delta, .amp_ok, .phase_ok, .state);

  adc_model conv_rail (.sclk, .scs, .value(v1), .sdout(sdout1));
  adc_model conv_ref  (.sclk, .scs, .value(v2), .sdout(sdout2));

  always #69.444 clk = ~clk;   // 7.2 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.141592653589793;
  real rail_a = 0.8, rail_f = 275.0;
  int  n_smp = 0;
  function automatic logic [15:0] code(input real x);
    return 16'(32768 + $rtoi($floor(x * 32767.0 + 0.5)));
  endfunction
  always @(posedge scs) begin
    real t;
    t  = n_smp / 3600.0;
    v1 = code(rail_a * $cos(2.0 * PI * rail_f * t + PI / 2.0));
    v2 = code(0.9 * $cos(2.0 * PI * 275.0 * t));
    n_smp++;
  end

  int ticks = 0;
  always @(posedge clk) if (state == ST_DELAY) ticks <= ticks + 1;

  int n_pull = 0, n_drop = 0, n_reject = 0;

  task automatic wait_ticks(input int n);
    int t0 = ticks;
    while (ticks < t0 + n) @(posedge clk);
  endtask

  initial begin
    int t0, t1;
    repeat (5) @(posedge clk);
    reset = 0;
    // free track
    t0 = ticks;
    while (!(amp_ok && phase_ok) && ticks < 2000) @(posedge clk);
    t0 = ticks;
    while (!efcp_out && ticks < t0 + 600) @(posedge clk);
    check(efcp_out && (ticks - t0 == 504 || ticks - t0 == 505), $sformatf("pull after %0d ticks", ticks - t0));
    if (efcp_out) n_pull++;
    wait_ticks(800);
    check(real'(rail_amp) > 0.8 * 120340.0 * 0.97 && real'(rail_amp) < 0.8 * 120340.0 * 1.03,
          $sformatf("rail amplitude %0d", rail_amp));
    check(int'(delta) >= 126 && int'(delta) <= 130, $sformatf("phase difference %0d", delta));
    // shunt
    rail_a = 0.05;
    while (amp_ok && ticks < t0 + 3000) @(posedge clk);
    t1 = ticks;
    while (efcp_out && ticks < t1 + 400) @(posedge clk);
    check(!efcp_out && (ticks - t1 == 360 || ticks - t1 == 361), $sformatf("drop after %0d ticks", ticks - t1));
    if (!efcp_out) n_drop++;
    // a 75 Hz rail signal is outside the 275 Hz bin
    rail_a = 0.8; rail_f = 75.0;
    wait_ticks(1500);
    $display("75 Hz input: rail amplitude %0d", rail_amp);
    check(!amp_ok && !efcp_out, "75 Hz signal rejected by the 275 Hz relay");
    if (!amp_ok && !efcp_out) n_reject++;
    $display("mechanisms: pull=%0d drop=%0d wrong_frequency_rejected=%0d", n_pull, n_drop, n_reject);
    check(n_pull == 1 && n_drop == 1 && n_reject == 1, "every situation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
