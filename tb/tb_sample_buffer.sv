// tb_sample_buffer: writes random samples into the circular buffer and,
// after each write, reads one full pass, comparing it with a reference model
// of the last 720 samples (unwritten history reads as zero). Checks that
// each read returns data one cycle after the request and that ram_read_end is
// high exactly on the 720th sample of a pass. Covers the fill phase, many
// wraps of the write pointer and a reset in the middle.
`timescale 1ns/1ps
module tb_sample_buffer;
  localparam int LEN = 720;
  logic clk = 1'b0, reset = 1'b1;
  logic ram_en = 0, ram_rd_wr = 0, ram_home = 0, ram_read_end;
  logic signed [11:0] din = '0, dout;
  int checks = 0, failures = 0;

  sample_buffer dut (.clk, .reset, .ram_en, .ram_rd_wr, .ram_home, .din, .dout, .ram_read_end);

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

  logic signed [11:0] hist[$];   // oldest first, always LEN entries

  task automatic clear_model();
    hist.delete();
    repeat (LEN) hist.push_back('0);
  endtask

  // inputs change on the falling clock edge, away from the sampling edge
  task automatic write(input logic signed [11:0] v);
    @(negedge clk);
    din = v; ram_en = 1; ram_rd_wr = 0; ram_home = 0;
    @(negedge clk);
    ram_en = 0;
    void'(hist.pop_front());
    hist.push_back(v);
  endtask

  task automatic read_pass();
    @(negedge clk);
    ram_home = 1; ram_rd_wr = 1; ram_en = 0;
    @(negedge clk);
    ram_home = 0; ram_en = 1;
    for (int i = 0; i < LEN; i++) begin
      check(dout == hist[i], $sformatf("sample %0d: got %0d want %0d", i, dout, hist[i]));
      check(ram_read_end == (i == LEN - 1), $sformatf("read_end at %0d", i));
      @(negedge clk);
    end
    ram_en = 0; ram_rd_wr = 0;
  endtask

  initial begin
    clear_model();
    repeat (3) @(negedge clk);
    reset = 0;
    read_pass();                                  // empty buffer reads zero
    for (int n = 0; n < 800; n++) begin
      write(12'($urandom));
      if (n < 4 || n % 97 == 0 || (n >= 716 && n < 724)) read_pass();
    end
    read_pass();
    // reset forgets the history even though the RAM still holds it
    @(negedge clk); reset = 1; @(negedge clk); reset = 0;
    clear_model();
    read_pass();
    for (int n = 0; n < 5; n++) write(12'($urandom));
    read_pass();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
