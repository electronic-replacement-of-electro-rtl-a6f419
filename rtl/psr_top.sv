// psr_top: electronic phase sensitive relay for a railway track circuit.
//
// A track circuit feeds a 75 Hz (or 275 Hz) signal into an insulated rail
// section; a train's axles short the rails, which changes the amplitude and
// the phase of the signal seen at the far end relative to a reference taken
// from the same supply. This circuit replaces the electro-mechanical relay
// that detects that change. Both signals are sampled at 3.6 kHz by two serial
// 16-bit converters (adc_ctrl, clock_gen) and written to two 720-sample
// circular buffers (sample_buffer). For every new sample pair ctrl_fsm runs a
// windowed one-point DFT (dft_point with coef_rom) over each buffer, turns
// both complex results into amplitude and phase (cordic), compares the rail
// amplitude and the rail-to-reference phase difference with thresholds that
// have hysteresis (threshold), ANDs the two decisions and passes the result
// through the pull/drop timer (pull_drop) to the relay output efcp_out
// (1 = track free). One DFT unit and one CORDIC are shared by both channels;
// the controller uses 2000 clocks of 7.2 MHz per sample, all published
// figures.
//
// Interface: clk is the 7.2 MHz system clock, reset is synchronous and
// active high. sclk/scs/sdout1/sdout2 connect to the two converters (rail on
// sdout1, reference on sdout2, which is this design's assignment). pull sets
// the pull time in sample periods (504..36000 for 140 ms..10 s); the drop
// time is DROP_TICKS sample periods (360 = 100 ms). The remaining outputs
// expose the measured values for monitoring; they are updated once per
// sample period.
module psr_top
  import psr_pkg::*;
#(
  parameter int unsigned K_BIN      = 15,       // DFT bin: 15 = 75 Hz, 55 = 275 Hz
  parameter int unsigned DROP_TICKS = 360,      // 100 ms at 3.6 kHz
  parameter amp_t        AMP_ON     = 20'd30000,
  parameter amp_t        AMP_OFF    = 20'd24000,
  parameter phase_t      PH_LO      = 9'sd85,
  parameter phase_t      PH_HI      = 9'sd171,
  parameter phase_t      PH_HYST    = 9'sd6
) (
  input  logic        clk,
  input  logic        reset,
  // converters
  output logic        sclk,
  output logic        scs,
  input  logic        sdout1,
  input  logic        sdout2,
  // relay
  input  logic [15:0] pull,
  output logic        efcp_out,
  // monitoring
  output amp_t        rail_amp,
  output amp_t        ref_amp,
  output phase_t      rail_phase,
  output phase_t      ref_phase,
  output phase_t      delta,
  output logic        amp_ok,
  output logic        phase_ok,
  output state_t      state
);
  // ---------------------------------------------------------------- timing
  logic adc_clk, adc_start;
  clock_gen u_clock_gen (.clk, .reset, .adc_clk, .adc_start);

  // ----------------------------------------------------------- acquisition
  sample_t adc_data1, adc_data2;
  logic    adc_out_rdy;
  adc_ctrl u_adc_ctrl (
    .clk, .reset, .adc_clk, .adc_start,
    .sclk, .scs, .sdout1, .sdout2,
    .data1(adc_data1), .data2(adc_data2), .adc_out_rdy
  );

  // ------------------------------------------------------------ controller
  logic smp_wr, ram_en, ram_rd_wr, ram_home, ram_sel;
  logic rom_reset, rom_en, sum_reset, sum_en, dft1_wr, dft2_wr;
  logic crd_en, crd_start, crd_sel, crd_done, crd1_wr, crd2_wr, th_en, pd_clk;
  logic ram1_read_end, ram2_read_end;

  ctrl_fsm u_ctrl_fsm (
    .clk, .reset, .adc_out_rdy, .ram1_read_end, .ram2_read_end, .crd_done,
    .smp_wr, .ram_en, .ram_rd_wr, .ram_home, .ram_sel, .rom_reset, .rom_en,
    .sum_reset, .sum_en, .dft1_wr, .dft2_wr, .crd_en, .crd_start, .crd_sel,
    .crd1_wr, .crd2_wr, .th_en, .pd_clk, .state
  );

  // --------------------------------------------------------------- buffers
  sample_t smp1, smp2, ram1_data, ram2_data;
  always_ff @(posedge clk) begin
    if (reset) begin
      smp1 <= '0;
      smp2 <= '0;
    end else if (smp_wr) begin
      smp1 <= adc_data1;
      smp2 <= adc_data2;
    end
  end

  // writes go to both buffers, a read pass to the one ram_sel chooses
  logic ram1_en, ram2_en, ram1_home, ram2_home;
  assign ram1_en   = ram_en   && !(ram_rd_wr &&  ram_sel);
  assign ram2_en   = ram_en   && !(ram_rd_wr && !ram_sel);
  assign ram1_home = ram_home && !ram_sel;
  assign ram2_home = ram_home &&  ram_sel;

  sample_buffer u_ram1 (
    .clk, .reset, .ram_en(ram1_en), .ram_rd_wr, .ram_home(ram1_home),
    .din(smp1), .dout(ram1_data), .ram_read_end(ram1_read_end)
  );
  sample_buffer u_ram2 (
    .clk, .reset, .ram_en(ram2_en), .ram_rd_wr, .ram_home(ram2_home),
    .din(smp2), .dout(ram2_data), .ram_read_end(ram2_read_end)
  );

  // ------------------------------------------------------------ one-point DFT
  coef_t cos_data, sin_data;
  coef_rom #(.K(K_BIN)) u_coef_rom (.clk, .rom_reset, .rom_en, .cos_data, .sin_data);

  dft_t dft_real, dft_imag;
  dft_point u_dft (
    .clk, .sum_reset, .sum_en, .cos_data, .sin_data,
    .ram_data(ram_sel ? ram2_data : ram1_data), .dft_real, .dft_imag
  );

  dft_t re1, im1, re2, im2;
  always_ff @(posedge clk) begin
    if (reset) begin
      re1 <= '0; im1 <= '0; re2 <= '0; im2 <= '0;
    end else begin
      if (dft1_wr) begin re1 <= dft_real; im1 <= dft_imag; end
      if (dft2_wr) begin re2 <= dft_real; im2 <= dft_imag; end
    end
  end

  // ----------------------------------------------------------------- CORDIC
  amp_t   crd_amp;
  phase_t crd_phase;
  cordic u_cordic (
    .clk, .reset, .crd_en, .crd_start,
    .crd_x(crd_sel ? re2 : re1), .crd_y(crd_sel ? im2 : im1),
    .crd_done, .crd_amp, .crd_phase
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      rail_amp <= '0; rail_phase <= '0; ref_amp <= '0; ref_phase <= '0;
    end else begin
      if (crd1_wr) begin rail_amp <= crd_amp; rail_phase <= crd_phase; end
      if (crd2_wr) begin ref_amp  <= crd_amp; ref_phase  <= crd_phase; end
    end
  end

  // ------------------------------------------------------ decision and timer
  threshold #(
    .AMP_ON(AMP_ON), .AMP_OFF(AMP_OFF), .PH_LO(PH_LO), .PH_HI(PH_HI), .PH_HYST(PH_HYST)
  ) u_threshold (
    .clk, .reset, .th_en, .rail_amp, .ref_phase, .rail_phase, .amp_ok, .phase_ok, .delta
  );

  pull_drop #(.CNT_W(16)) u_pull_drop (
    .clk, .reset, .pd_clk, .pull, .drop(16'(DROP_TICKS)),
    .din(amp_ok && phase_ok), .dout(efcp_out)
  );
endmodule
