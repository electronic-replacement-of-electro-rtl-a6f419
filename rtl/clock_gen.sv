// clock_gen: timing strobes for the converter interface.
//
// From the 7.2 MHz system clock it derives the 2.4 MHz converter bit clock and
// the 3.6 kHz sampling strobe. Both frequencies are the published ones. They
// are produced here as single-cycle clock enables in the system clock domain
// rather than as separate clocks, so the whole relay is one synchronous
// design; that is a choice of this design.
//
// A sampling period (2000 clocks) is not a whole number of bit periods (3
// clocks), so the bit divider is restarted with every sampling strobe: the
// bit enable always coincides with adc_start, and the last bit period before
// a strobe is shortened to 2000 mod 3 = 2 clocks while the converters are
// idle. Every conversion then has the same timing relative to its strobe, and
// the controller's wait for data is the same 522 clocks in every period.
// This alignment is a choice of this design.
//
// Interface: adc_clk is high for one clk cycle every CLK_HZ/ADC_CLK_HZ cycles
// (every 3rd, counted from the last adc_start), adc_start for one cycle every
// CLK_HZ/SAMPLE_HZ cycles (every 2000th). After reset the first adc_start
// comes in the first cycle after reset is released, the next one a full
// sampling period later.
module clock_gen #(
  parameter int unsigned CLK_HZ     = 7_200_000,
  parameter int unsigned ADC_CLK_HZ = 2_400_000,
  parameter int unsigned SAMPLE_HZ  = 3_600
) (
  input  logic clk,
  input  logic reset,
  output logic adc_clk,
  output logic adc_start
);
  localparam int unsigned BIT_DIV = CLK_HZ / ADC_CLK_HZ;
  localparam int unsigned SMP_DIV = CLK_HZ / SAMPLE_HZ;

  logic [$clog2(BIT_DIV)-1:0] bit_cnt;
  logic [$clog2(SMP_DIV)-1:0] smp_cnt;

  always_ff @(posedge clk) begin
    if (reset) begin
      bit_cnt <= '0;
      smp_cnt <= '0;
    end else begin
      if (smp_cnt == ($bits(smp_cnt))'(SMP_DIV - 1)) begin
        smp_cnt <= '0;
        bit_cnt <= '0;
      end else begin
        smp_cnt <= smp_cnt + 1'b1;
        bit_cnt <= (bit_cnt == ($bits(bit_cnt))'(BIT_DIV - 1)) ? '0 : bit_cnt + 1'b1;
      end
    end
  end

  assign adc_clk   = !reset && (bit_cnt == '0);
  assign adc_start = !reset && (smp_cnt == '0);

  initial begin
    assert (BIT_DIV >= 2 && CLK_HZ % ADC_CLK_HZ == 0)
      else $error("ADC_CLK_HZ must divide CLK_HZ at least twice");
    assert (CLK_HZ % SAMPLE_HZ == 0)
      else $error("SAMPLE_HZ must divide CLK_HZ");
  end
endmodule
