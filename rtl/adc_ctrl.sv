// adc_ctrl: serial interface to the two successive-approximation converters.
//
// The rail channel (sdout1) and the reference channel (sdout2) are converted
// simultaneously by two 16-bit converters that share chip select (scs) and
// serial clock (sclk). On each adc_start strobe the controller pulls scs low
// and issues FRAME_BITS sclk pulses, one per adc_clk enable (sclk is high for
// one system clock, so at 7.2 MHz it runs at 2.4 MHz with 1/3 duty). The
// converters are assumed to change sdout after each falling sclk edge and to
// send LEAD_BITS bits of acquisition/null time before their 16 data bits,
// most significant bit first; the controller samples both data lines in the
// cycle sclk falls, shifting every bit into a 16-bit register, so that after
// the last pulse only the 16 data bits remain. The frame length, the bit
// timing and the offset-binary output code are this design's reading of a
// typical 16-bit serial converter; the published design only names the
// signals and says the converters are 16-bit with serial output.
//
// Each result is cut to its 12 most significant bits (the buffers are 12 bits
// wide) and, when OFFSET_BINARY is set, its MSB is inverted to give a two's
// complement sample. data1/data2 are valid together with the one-cycle
// adc_out_rdy pulse and hold until the next conversion ends. Latency from
// adc_start to adc_out_rdy is about 3*FRAME_BITS+2 system clocks.
module adc_ctrl
  import psr_pkg::*;
#(
  parameter int unsigned FRAME_BITS    = 22,
  parameter bit          OFFSET_BINARY = 1'b1
) (
  input  logic    clk,
  input  logic    reset,
  input  logic    adc_clk,      // bit-clock enable from clock_gen
  input  logic    adc_start,    // sampling strobe from clock_gen
  // converter pins
  output logic    sclk,
  output logic    scs,
  input  logic    sdout1,
  input  logic    sdout2,
  // samples
  output sample_t data1,
  output sample_t data2,
  output logic    adc_out_rdy
);
  logic [ADC_BITS-1:0] sh1, sh2;
  logic [$clog2(FRAME_BITS+1)-1:0] nbits;
  logic busy;

  function automatic sample_t to_sample(input logic [SAMPLE_W-1:0] msbs);
    logic [SAMPLE_W-1:0] top;
    top = msbs;
    if (OFFSET_BINARY) top[SAMPLE_W-1] = ~top[SAMPLE_W-1];
    return sample_t'(top);
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      sclk        <= 1'b0;
      scs         <= 1'b1;
      busy        <= 1'b0;
      nbits       <= '0;
      sh1         <= '0;
      sh2         <= '0;
      data1       <= '0;
      data2       <= '0;
      adc_out_rdy <= 1'b0;
    end else begin
      adc_out_rdy <= 1'b0;
      if (!busy) begin
        if (adc_start) begin
          busy  <= 1'b1;
          scs   <= 1'b0;
          nbits <= '0;
        end
      end else if (sclk) begin
        // falling edge of sclk: take the bit the converters are presenting
        sclk  <= 1'b0;
        sh1   <= {sh1[ADC_BITS-2:0], sdout1};
        sh2   <= {sh2[ADC_BITS-2:0], sdout2};
        nbits <= nbits + 1'b1;
      end else if (nbits == ($bits(nbits))'(FRAME_BITS)) begin
        busy        <= 1'b0;
        scs         <= 1'b1;
        data1       <= to_sample(sh1[ADC_BITS-1 -: SAMPLE_W]);
        data2       <= to_sample(sh2[ADC_BITS-1 -: SAMPLE_W]);
        adc_out_rdy <= 1'b1;
      end else if (adc_clk) begin
        sclk <= 1'b1;
      end
    end
  end

  initial assert (FRAME_BITS >= ADC_BITS)
    else $error("a frame must carry all %0d data bits", ADC_BITS);
endmodule
