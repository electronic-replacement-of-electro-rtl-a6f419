// tb_ctrl_fsm: runs the controller against models of its surroundings: a
// sample strobe every 2000 clocks, buffers whose read pass ends on the 720th
// sample after ram_home, and a CORDIC that finishes in the 13th crd_en cycle.
// For every pass it checks the order of the states and the number of clocks
// spent in each against the published table (WAIT_DATA 522, DFTn 720,
// CORDICn 13, all others 1; 2000 per sample), and it counts the control
// pulses: one buffer write, 2 x 720 accumulate cycles, one result write per
// channel, one threshold update and one pull/drop tick per pass.
`timescale 1ns/1ps
module tb_ctrl_fsm;
  import psr_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  logic adc_out_rdy = 0, ram1_read_end, ram2_read_end, crd_done;
  logic smp_wr, ram_en, ram_rd_wr, ram_home, ram_sel, rom_reset, rom_en, sum_reset, sum_en;
  logic dft1_wr, dft2_wr, crd_en, crd_start, crd_sel, crd1_wr, crd2_wr, th_en, pd_clk;
  state_t state;
  int checks = 0, failures = 0;

  ctrl_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- environment models
  int rd_cnt = 0, crd_cnt = 0, cyc = 0;
  assign ram1_read_end = !ram_sel && rd_cnt == 720;
  assign ram2_read_end =  ram_sel && rd_cnt == 720;
  assign crd_done      = crd_en && crd_cnt == 12;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ram_home) rd_cnt <= 1;
    else if (ram_en && ram_rd_wr) rd_cnt <= rd_cnt + 1;
    if (crd_start) crd_cnt <= 0;
    else if (crd_en) crd_cnt <= crd_cnt + 1;
  end
  always @(negedge clk) adc_out_rdy = !reset && (cyc % 2000 == 70);

  // ---- expected sequence
  state_t seq[17] = '{ST_WAIT_DATA, ST_RAM_DATA, ST_RAM_WRITE, ST_DFT1_PRE, ST_DFT1, ST_DFT1_END,
                      ST_DFT2_PRE, ST_DFT2, ST_DFT2_END, ST_CORDIC1_PRE, ST_CORDIC1, ST_CORDIC1_END,
                      ST_CORDIC2_PRE, ST_CORDIC2, ST_CORDIC2_END, ST_THRESHOLD, ST_DELAY};
  int len[17] = '{522, 1, 1, 1, 720, 1, 1, 720, 1, 1, 13, 1, 1, 13, 1, 1, 1};

  int passes = 0;
  initial begin
    state_t cur;
    int n, total;
    int c_sum, c_wr, c_dft1, c_dft2, c_crd1, c_crd2, c_th, c_pd, c_smp;
    repeat (2) @(negedge clk);
    check(state == ST_START, "START during reset");
    reset = 0;
    @(negedge clk);
    check(state == ST_WAIT_DATA, "START lasts one clock");
    // first wait is shorter (the first sample comes 70 clocks after reset)
    while (state == ST_WAIT_DATA) @(negedge clk);
    check(state == ST_RAM_DATA, "leave WAIT_DATA on adc_out_rdy");
    while (state != ST_WAIT_DATA) @(negedge clk);
    repeat (6) begin
      total = 0;
      c_sum = 0; c_wr = 0; c_dft1 = 0; c_dft2 = 0; c_crd1 = 0; c_crd2 = 0; c_th = 0; c_pd = 0; c_smp = 0;
      for (int s = 0; s < 17; s++) begin
        cur = state;
        check(cur == seq[s], $sformatf("state %s, want %s", cur.name(), seq[s].name()));
        n = 0;
        while (state == cur) begin
          n++;
          c_sum += sum_en;  c_wr += (ram_en && !ram_rd_wr); c_smp += smp_wr;
          c_dft1 += dft1_wr; c_dft2 += dft2_wr; c_crd1 += crd1_wr; c_crd2 += crd2_wr;
          c_th += th_en; c_pd += pd_clk;
          if (cur inside {ST_DFT2_PRE, ST_DFT2}) check(ram_sel, "RAM2 selected in DFT2");
          if (cur inside {ST_DFT1_PRE, ST_DFT1}) check(!ram_sel, "RAM1 selected in DFT1");
          if (cur == ST_CORDIC2_PRE) check(crd_sel && crd_start, "CORDIC2 loads channel 2");
          if (cur == ST_CORDIC1_PRE) check(!crd_sel && crd_start, "CORDIC1 loads channel 1");
          @(negedge clk);
        end
        check(n == len[s], $sformatf("%s lasted %0d clocks, want %0d", cur.name(), n, len[s]));
        total += n;
      end
      check(total == 2000, $sformatf("pass took %0d clocks", total));
      check(c_sum == 1440 && c_wr == 1 && c_smp == 1, "accumulate and write counts");
      check(c_dft1 == 1 && c_dft2 == 1 && c_crd1 == 1 && c_crd2 == 1, "result register writes");
      check(c_th == 1 && c_pd == 1, "one threshold update and one tick per pass");
      passes++;
    end
    check(passes == 6, "six passes checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
