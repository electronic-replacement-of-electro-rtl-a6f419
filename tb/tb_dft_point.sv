// tb_dft_point: feeds runs of random samples and coefficients (and, once, the
// extreme values that force saturation) and compares the 18-bit outputs with
// sums computed here in 64-bit arithmetic: real = sum(x*c) >>> 12,
// imag = -sum(x*s) >>> 12, saturated to the 18-bit range. Also checks that
// sum_reset clears the sums and that cycles without sum_en add nothing.
`timescale 1ns/1ps
module tb_dft_point;
  logic clk = 1'b0, sum_reset = 1'b0, sum_en = 1'b0;
  logic signed [9:0]  cos_data = '0, sin_data = '0;
  logic signed [11:0] ram_data = '0;
  logic signed [17:0] dft_real, dft_imag;
  int checks = 0, failures = 0;

  dft_point dut (.clk, .sum_reset, .sum_en, .cos_data, .sin_data, .ram_data, .dft_real, .dft_imag);

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

  function automatic longint sat18(input longint a);
    longint s = a >>> 12;
    if (s > 131071) return 131071;
    if (s < -131072) return -131072;
    return s;
  endfunction

  // mode 0: random, 1: all maximum (positive saturation), 2: saturate imag negative
  task automatic run(input int len, input int mode);
    longint sr = 0, si = 0;
    @(negedge clk);
    sum_reset = 1;
    @(negedge clk);
    sum_reset = 0;
    check(dft_real == 0 && dft_imag == 0, "cleared by sum_reset");
    for (int i = 0; i < len; i++) begin
      case (mode)
        1: begin ram_data = -2048; cos_data = -512; sin_data = -512; end
        2: begin ram_data = 2047;  cos_data = 511;  sin_data = 511;  end
        default: begin
          ram_data = 12'($urandom); cos_data = 10'($urandom); sin_data = 10'($urandom);
        end
      endcase
      sum_en = ($urandom % 8 != 0);
      if (sum_en) begin
        sr += longint'(ram_data) * longint'(cos_data);
        si -= longint'(ram_data) * longint'(sin_data);
      end
      @(negedge clk);
    end
    sum_en = 0;
    check(dft_real == sat18(sr), $sformatf("real %0d want %0d", dft_real, sat18(sr)));
    check(dft_imag == sat18(si), $sformatf("imag %0d want %0d", dft_imag, sat18(si)));
  endtask

  initial begin
    for (int n = 0; n < 60; n++) run(1 + $urandom % 720, 0);
    run(720, 1);
    check(dft_real == 131071 && dft_imag == -131072, "saturates at both ends");
    run(720, 2);
    check(dft_real == 131071 && dft_imag == -131072, "saturates, other sign");
    run(3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
