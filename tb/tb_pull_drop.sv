// tb_pull_drop: drives the track-free input through steady runs, short
// interruptions and noise, and compares the relay output tick by tick with a
// reference model of the two saturating counters. Checks the exact pull time
// (output rises on the pull-th tick of a clean run of ones) and drop time
// (falls on the drop-th tick of a clean run of zeros) for the shortest
// published pull time (504 ticks = 140 ms), a mid value and the longest
// (36000 ticks = 10 s) with the fixed drop of 360 ticks (100 ms), and that
// nothing happens between ticks.
`timescale 1ns/1ps
module tb_pull_drop;
  logic clk = 1'b0, reset = 1'b1, pd_clk = 1'b0, din = 1'b0, dout;
  logic [15:0] pull = 16'd504, drop = 16'd360;
  int checks = 0, failures = 0;

  pull_drop dut (.clk, .reset, .pd_clk, .pull, .drop, .din, .dout);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_cnt = 0, f_cnt = 0;
  bit m_out = 0;

  // one tick with input v; returns after the output has settled
  task automatic tick(input bit v);
    @(negedge clk);
    din = v; pd_clk = 1;
    if (v) begin
      t_cnt = (t_cnt >= pull) ? pull : t_cnt + 1;
      f_cnt = (f_cnt == 0) ? 0 : f_cnt - 1;
    end else begin
      f_cnt = (f_cnt >= drop) ? drop : f_cnt + 1;
      t_cnt = (t_cnt == 0) ? 0 : t_cnt - 1;
    end
    if (f_cnt == drop) m_out = 0;
    else if (t_cnt == pull) m_out = 1;
    @(negedge clk);
    pd_clk = 0;
    check(dout == m_out, $sformatf("output %b want %b (T=%0d F=%0d)", dout, m_out, t_cnt, f_cnt));
    // no change between ticks
    din = !v;
    @(negedge clk);
    check(dout == m_out, "stable between ticks");
  endtask

  task automatic timed_run(input bit v, input int expect_ticks);
    int n = 0;
    while (dout != v && n < 70000) begin tick(v); n++; end
    check(n == expect_ticks, $sformatf("%s after %0d ticks, want %0d", v ? "pull" : "drop", n, expect_ticks));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(dout == 0, "reset output is 0");
    reset = 0;
    foreach (pull_vals[i]) begin
      pull = pull_vals[i];
      timed_run(1, pull);                       // from empty counters
      repeat (50) tick(1);                      // saturated
      timed_run(0, 360);
      while (t_cnt > 0) tick(0);               // empty the True counter
    end
    pull = 504;
    // a short gap during a pull takes back as many ticks as it lasted
    repeat (100) tick(1);
    repeat (20) tick(0);
    timed_run(1, 504 - 80);
    // short interruptions do not drop the output
    repeat (10) begin repeat (200) tick(0); repeat (200) tick(1); end
    check(dout == 1, "no drop on interrupted zeros");
    // random input
    for (int n = 0; n < 20000; n++) tick($urandom % 4 != 0);
    for (int n = 0; n < 20000; n++) tick($urandom % 3 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pull_vals[3] = '{504, 5000, 36000};
endmodule
