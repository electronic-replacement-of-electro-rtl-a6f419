// ctrl_fsm: sequencer of the relay, one full pass per sample period.
//
// After every new pair of samples the controller writes them into both
// circular buffers, runs the one-point DFT over the rail buffer and then over
// the reference buffer, converts both complex results with the CORDIC, updates
// the threshold decision and gives the pull/drop timer one tick. The state
// list and the number of clocks in each state are the published ones:
//
//   START 1, WAIT_DATA 522, RAM_DATA 1, RAM_WRITE 1,
//   DFT1_PRE 1, DFT1 720, DFT1_END 1, DFT2_PRE 1, DFT2 720, DFT2_END 1,
//   CORDIC1_PRE 1, CORDIC1 13, CORDIC1_END 1, CORDIC2_PRE 1, CORDIC2 13,
//   CORDIC2_END 1, THRESHOLD 1, DELAY 1            (2000 clocks per pass)
//
// WAIT_DATA is left on adc_out_rdy, DFTn on ramn_read_end and CORDICn on
// crd_done, so the 522 clocks are simply what remains of the 2000-clock
// (3.6 kHz at 7.2 MHz) sample period. What each state drives is this
// design's reading of the state names:
//   RAM_DATA    smp_wr: load the new samples into the buffer input register
//   RAM_WRITE   ram_en, ram_rd_wr=0: write both buffers
//   DFTn_PRE    ram_home, rom_reset, sum_reset: start a read pass, clear sums
//   DFTn        ram_en, ram_rd_wr=1, rom_en, sum_en: 720 multiply-accumulates
//   DFTn_END    dftn_wr: store the complex result of channel n
//   CORDICn_PRE crd_start with crd_sel = n-1: load the CORDIC
//   CORDICn     crd_en: 13 micro-rotations
//   CORDICn_END crdn_wr: store amplitude and phase of channel n
//   THRESHOLD   th_en: update the amplitude and phase decision
//   DELAY       pd_clk: one tick of the pull/drop counters
// ram_sel chooses the buffer that is read (0: RAM1 rail, 1: RAM2 reference);
// writes go to both. All outputs are decoded from the state register
// (Moore outputs).
module ctrl_fsm
  import psr_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   adc_out_rdy,
  input  logic   ram1_read_end,
  input  logic   ram2_read_end,
  input  logic   crd_done,
  output logic   smp_wr,
  output logic   ram_en,
  output logic   ram_rd_wr,
  output logic   ram_home,
  output logic   ram_sel,
  output logic   rom_reset,
  output logic   rom_en,
  output logic   sum_reset,
  output logic   sum_en,
  output logic   dft1_wr,
  output logic   dft2_wr,
  output logic   crd_en,
  output logic   crd_start,
  output logic   crd_sel,
  output logic   crd1_wr,
  output logic   crd2_wr,
  output logic   th_en,
  output logic   pd_clk,
  output state_t state
);
  state_t nxt;

  always_ff @(posedge clk) begin
    if (reset) state <= ST_START;
    else       state <= nxt;
  end

  always_comb begin
    nxt = state;
    unique case (state)
      ST_START:       nxt = ST_WAIT_DATA;
      ST_WAIT_DATA:   if (adc_out_rdy) nxt = ST_RAM_DATA;
      ST_RAM_DATA:    nxt = ST_RAM_WRITE;
      ST_RAM_WRITE:   nxt = ST_DFT1_PRE;
      ST_DFT1_PRE:    nxt = ST_DFT1;
      ST_DFT1:        if (ram1_read_end) nxt = ST_DFT1_END;
      ST_DFT1_END:    nxt = ST_DFT2_PRE;
      ST_DFT2_PRE:    nxt = ST_DFT2;
      ST_DFT2:        if (ram2_read_end) nxt = ST_DFT2_END;
      ST_DFT2_END:    nxt = ST_CORDIC1_PRE;
      ST_CORDIC1_PRE: nxt = ST_CORDIC1;
      ST_CORDIC1:     if (crd_done) nxt = ST_CORDIC1_END;
      ST_CORDIC1_END: nxt = ST_CORDIC2_PRE;
      ST_CORDIC2_PRE: nxt = ST_CORDIC2;
      ST_CORDIC2:     if (crd_done) nxt = ST_CORDIC2_END;
      ST_CORDIC2_END: nxt = ST_THRESHOLD;
      ST_THRESHOLD:   nxt = ST_DELAY;
      ST_DELAY:       nxt = ST_WAIT_DATA;
      default:        nxt = ST_START;
    endcase
  end

  logic dft_pre, dft_run;
  assign dft_pre = (state == ST_DFT1_PRE) || (state == ST_DFT2_PRE);
  assign dft_run = (state == ST_DFT1)     || (state == ST_DFT2);

  assign smp_wr    = (state == ST_RAM_DATA);
  assign ram_en    = (state == ST_RAM_WRITE) || dft_run;
  assign ram_rd_wr = dft_pre || dft_run;
  assign ram_home  = dft_pre;
  assign ram_sel   = (state == ST_DFT2_PRE) || (state == ST_DFT2);
  assign rom_reset = dft_pre;
  assign rom_en    = dft_run;
  assign sum_reset = dft_pre;
  assign sum_en    = dft_run;
  assign dft1_wr   = (state == ST_DFT1_END);
  assign dft2_wr   = (state == ST_DFT2_END);
  assign crd_start = (state == ST_CORDIC1_PRE) || (state == ST_CORDIC2_PRE);
  assign crd_en    = (state == ST_CORDIC1) || (state == ST_CORDIC2);
  assign crd_sel   = (state == ST_CORDIC2_PRE) || (state == ST_CORDIC2);
  assign crd1_wr   = (state == ST_CORDIC1_END);
  assign crd2_wr   = (state == ST_CORDIC2_END);
  assign th_en     = (state == ST_THRESHOLD);
  assign pd_clk    = (state == ST_DELAY);

  // A new sample must only arrive while the controller waits for it;
  // otherwise the processing pass is longer than the sample period.
  a_no_overrun: assert property (@(posedge clk) disable iff (reset)
    adc_out_rdy |-> (state == ST_WAIT_DATA))
    else $error("sample arrived while the previous one was still being processed");
endmodule
