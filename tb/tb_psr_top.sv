// tb_psr_top: end-to-end test of the relay at its default parameters.
//
// Two behavioural converters are fed with a 75 Hz reference cosine and a
// 75 Hz rail signal whose amplitude and phase the test changes, sampled at
// the instant chip select falls. Samples are offset-binary 16-bit values.
// The test goes through the situations the relay exists for and checks the
// output and its timing:
//   1. free track (rail at 80 % of full scale, leading the reference by 90
//      degrees): the measured amplitude and phase difference are checked
//      against the expected values and the output must pull exactly 504
//      sample periods (140 ms) after the decision turns to free;
//   2. a train shunts the rails (rail amplitude falls to 5 %): the amplitude
//      flag must clear and the output drop exactly 360 periods (100 ms) later;
//   3. the train leaves: the relay pulls again;
//   4. a loss of the rail signal for 550 periods (about 150 ms; +DIP=n to
//      change) clears the amplitude flag for less than the drop time, and
//      the relay must hold;
//   5. an amplitude inside the hysteresis band keeps the flag, from above
//      and from below;
//   6. the rail signal shifts its phase to 0 degrees with full amplitude:
//      the phase flag must clear and the relay drop.
// Throughout, every sample period after the first must take exactly 2000
// clocks, 522 of them waiting for the next sample, as in the published
// schedule. Each of these mechanisms is counted and a failure is counted for any that
// never occurred.
`timescale 1ns/1ps
module tb_psr_top;
  import psr_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  logic sclk, scs, sdout1, sdout2, efcp_out, amp_ok, phase_ok;
  logic [15:0] pull = 16'd504;
  amp_t   rail_amp, ref_amp;
  phase_t rail_phase, ref_phase, delta;
  state_t state;
  logic [15:0] v1 = 16'h8000, v2 = 16'h8000;
  int checks = 0, failures = 0;

  psr_top dut (.clk, .reset, .sclk, .scs, .sdout1, .sdout2, .pull, .efcp_out,
               .rail_amp, .ref_amp, .rail_phase, .ref_phase, .delta, .amp_ok, .phase_ok, .state);

  adc_model conv_rail (.sclk, .scs, .value(v1), .sdout(sdout1));
  adc_model conv_ref  (.sclk, .scs, .value(v2), .sdout(sdout2));

  always #69.444 clk = ~clk;   // 7.2 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- signal source
  localparam real PI = 3.141592653589793;
  real rail_a = 0.8, rail_ph = 90.0;      // fraction of full scale, degrees
  int  n_smp = 0;
  function automatic logic [15:0] code(input real x);   // x in -1..1
    return 16'(32768 + $rtoi($floor(x * 32767.0 + 0.5)));
  endfunction
  // a new converter input for each conversion, set before chip select falls
  always @(posedge scs) begin
    real w;
    w  = 2.0 * PI * 75.0 * n_smp / 3600.0;
    v1 = code(rail_a * $cos(w + rail_ph * PI / 180.0));
    v2 = code(0.9 * $cos(w));
    n_smp++;
  end

  // ---------------------------------------------------------- observation
  int ticks = 0;                        // pull/drop ticks (DELAY states)
  always @(posedge clk) if (state == ST_DELAY) ticks <= ticks + 1;

  int DIP = 550;
  initial void'($value$plusargs("DIP=%d", DIP));
  // every pass after the first must take the published 2000 clocks,
  // 522 of them waiting for the next sample
  int wait_len = 0, cyc = 0, last_rdy = -1, n_periods = 0, bad_periods = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (state == ST_WAIT_DATA) wait_len <= wait_len + 1;
    if (state == ST_RAM_DATA) begin
      if (last_rdy >= 0 && ticks >= 2) begin
        n_periods <= n_periods + 1;
        if (wait_len != 522 || cyc - last_rdy != 2000) begin
          bad_periods <= bad_periods + 1;
          if (bad_periods < 3) $display("period %0d clocks, %0d waiting", cyc - last_rdy, wait_len);
        end
      end
      last_rdy <= cyc;
      wait_len <= 0;
    end
  end

  int n_pull = 0, n_drop = 0, n_amp_hold = 0, n_dip = 0, n_phase_fault = 0, n_shunt = 0;

  task automatic wait_ticks(input int n);
    int t0 = ticks;
    while (ticks < t0 + n) @(posedge clk);
  endtask

  // wait for sig to reach v; returns the tick count when it happened
  task automatic wait_for(ref logic sig, input logic v, input int max_ticks, output int at);
    int t0 = ticks;
    while (sig !== v && ticks < t0 + max_ticks) @(posedge clk);
    at = ticks;
    check(sig === v, $sformatf("signal did not reach %b within %0d ticks", v, max_ticks));
  endtask

  // decision free -> relay pulled: must take exactly `pull` ticks
  task automatic expect_pull();
    int t_free, t_out, t0;
    t0 = ticks;
    while (!(amp_ok && phase_ok) && ticks < t0 + 3000) @(posedge clk);
    t_free = ticks;
    wait_for(efcp_out, 1'b1, 600, t_out);
    check(t_out - t_free == 504 || t_out - t_free == 505,
          $sformatf("pull took %0d ticks, want 504", t_out - t_free));
    if (efcp_out) n_pull++;
  endtask

  task automatic expect_drop();
    int t_occ, t_out, t0;
    t0 = ticks;
    while (amp_ok && phase_ok && ticks < t0 + 3000) @(posedge clk);
    t_occ = ticks;
    wait_for(efcp_out, 1'b0, 400, t_out);
    check(t_out - t_occ == 360 || t_out - t_occ == 361,
          $sformatf("drop took %0d ticks, want 360", t_out - t_occ));
    if (!efcp_out) n_drop++;
  endtask

  function automatic int dphase(input phase_t a, input int want);
    int d = int'(a) - want;
    return ((d % 512) + 512 + 256) % 512 - 256;
  endfunction

  initial begin
    int at;
    real expect_amp;
    repeat (5) @(posedge clk);
    reset = 0;
    check(!efcp_out, "relay starts dropped");

    // 1. free track
    expect_pull();
    wait_ticks(800);                    // buffer completely filled with the signal
    // full-scale 12-bit sine gives about 120340 after CORDIC gain
    expect_amp = 0.8 * 120340.0;
    check(real'(rail_amp) > expect_amp * 0.98 && real'(rail_amp) < expect_amp * 1.02,
          $sformatf("rail amplitude %0d, expected about %0.0f", rail_amp, expect_amp));
    check(real'(ref_amp) > 0.9 * 120340.0 * 0.98 && real'(ref_amp) < 0.9 * 120340.0 * 1.02,
          $sformatf("reference amplitude %0d", ref_amp));
    check(dphase(delta, 128) >= -2 && dphase(delta, 128) <= 2,
          $sformatf("phase difference %0d, expected 128 (90 degrees)", delta));
    check(efcp_out && amp_ok && phase_ok, "free track pulled");

    // 2. train shunts the track
    rail_a = 0.05;
    begin
      int t_shunt;
      t_shunt = ticks;
      while (amp_ok && ticks < t_shunt + 1000) @(posedge clk);
      $display("shunt: amplitude flag cleared %0d sample periods after the shunt", ticks - t_shunt);
      check(ticks - t_shunt < 720, "shunt detected within one buffer length");
    end
    expect_drop();
    check(!amp_ok && phase_ok, "shunt is detected by amplitude");
    if (!amp_ok) n_shunt++;
    wait_ticks(800);
    check(!efcp_out, "relay stays dropped while shunted");

    // 3. train leaves
    rail_a = 0.8;
    expect_pull();
    wait_ticks(800);

    // 4. loss of signal long enough to clear the amplitude flag, but for
    //    less than the drop time: the relay must hold
    rail_a = 0.0;
    begin
      int t_low, t_high, t0;
      wait_ticks(DIP);
      rail_a = 0.8;
      t0 = ticks;
      t_low = 0; t_high = 0;
      while (ticks < t0 + 1200) begin
        @(posedge clk);
        if (!amp_ok && t_low == 0) t_low = ticks;
        if (amp_ok && t_low != 0 && t_high == 0) t_high = ticks;
      end
      $display("dip: amplitude flag low for %0d ticks", t_high - t_low);
      check(t_high - t_low > 0 && t_high - t_low < 360, "amplitude flag low for less than the drop time");
      check(efcp_out, "short loss filtered by the drop time");
      if (efcp_out && t_high > t_low) n_dip++;
    end

    // 5. hysteresis band: 22 % of full scale lies between 20 % and 25 %
    rail_a = 0.22;
    wait_ticks(900);
    check(amp_ok, "amplitude flag holds inside the band (from above)");
    if (amp_ok) n_amp_hold++;
    rail_a = 0.1;
    wait_for(amp_ok, 1'b0, 900, at);
    rail_a = 0.22;
    wait_ticks(900);
    check(!amp_ok, "amplitude flag holds inside the band (from below)");
    if (!amp_ok) n_amp_hold++;
    rail_a = 0.8;
    expect_pull();

    // 6. phase fault with full amplitude
    wait_ticks(100);
    rail_ph = 0.0;
    expect_drop();
    check(amp_ok && !phase_ok, "phase fault detected by phase window");
    if (!phase_ok) n_phase_fault++;
    wait_ticks(800);
    check(dphase(delta, 0) >= -2 && dphase(delta, 0) <= 2, $sformatf("phase difference %0d, expected 0", delta));

    $display("mechanisms: pull=%0d drop=%0d shunt=%0d dip_filtered=%0d amp_hysteresis=%0d phase_fault=%0d",
             n_pull, n_drop, n_shunt, n_dip, n_amp_hold, n_phase_fault);
    check(n_periods > 5000 && bad_periods == 0,
          $sformatf("%0d of %0d sample periods not 2000 clocks with 522 waiting", bad_periods, n_periods));
    check(n_pull == 3, "pull happened");
    check(n_drop == 2, "drop happened");
    check(n_shunt > 0, "shunt detected");
    check(n_dip > 0, "dip filtered");
    check(n_amp_hold == 2, "amplitude hysteresis held both ways");
    check(n_phase_fault > 0, "phase fault detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
