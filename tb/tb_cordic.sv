// tb_cordic: converts random vectors (and the axis and corner cases) and
// compares with polar values computed here in floating point:
// amplitude ~ 1.64676 * sqrt(x^2 + y^2) within 0.1 % + 4 LSB, phase
// ~ atan2(y, x) in 1/512 turn within 1 LSB (modulo a full turn). Checks that
// crd_done comes in the 13th crd_en cycle after crd_start, and that the
// results hold while the CORDIC is idle.
`timescale 1ns/1ps
module tb_cordic;
  logic clk = 1'b0, reset = 1'b1, crd_en = 1'b0, crd_start = 1'b0, crd_done;
  logic signed [17:0] crd_x = '0, crd_y = '0;
  logic [19:0] crd_amp;
  logic signed [8:0] crd_phase;
  int checks = 0, failures = 0;
  localparam real PI = 3.141592653589793;

  cordic dut (.clk, .reset, .crd_en, .crd_start, .crd_x, .crd_y, .crd_done, .crd_amp, .crd_phase);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(input int x, input int y);
    int cycles = 0;
    real amp, ph, err;
    int dph;
    @(negedge clk);
    crd_x = 18'(x); crd_y = 18'(y); crd_start = 1;
    @(negedge clk);
    crd_start = 0; crd_en = 1;
    do begin
      cycles++;
      #1;
      if (crd_done) break;
      @(negedge clk);
    end while (cycles < 40);
    check(cycles == 13, $sformatf("done after %0d iterations", cycles));
    @(negedge clk);
    crd_en = 0;
    amp = 1.6467602581 * $sqrt(real'(x) * x + real'(y) * y);
    err = real'(crd_amp) - amp;
    if (err < 0) err = -err;
    check(err <= amp * 0.001 + 4.0, $sformatf("amp(%0d,%0d) = %0d want %f", x, y, crd_amp, amp));
    if (x != 0 || y != 0) begin
      ph  = $atan2(real'(y), real'(x)) / (2.0 * PI) * 512.0;
      dph = int'(crd_phase) - $rtoi($floor(ph + 0.5));
      dph = ((dph % 512) + 512 + 256) % 512 - 256;
      check(dph >= -1 && dph <= 1, $sformatf("phase(%0d,%0d) = %0d want %f", x, y, crd_phase, ph));
    end
    // results hold while idle, even with crd_en high
    begin
      logic [19:0] a0;
      logic signed [8:0] p0;
      a0 = crd_amp; p0 = crd_phase;
      crd_en = 1;
      repeat (3) @(negedge clk);
      crd_en = 0;
      check(crd_amp == a0 && crd_phase == p0 && !crd_done, "results held while idle");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    convert(100000, 0);
    convert(0, 100000);
    convert(-100000, 0);
    convert(0, -100000);
    convert(-131072, -131072);
    convert(131071, 131071);
    convert(-131072, 131071);
    convert(73000, -5000);
    for (int n = 0; n < 500; n++) begin
      int x, y;
      x = -131072 + int'($urandom % 262144);   // full 18-bit range
      y = -131072 + int'($urandom % 262144);
      if (n % 3 == 0) begin x = x / 64; y = y / 64; end
      convert(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
