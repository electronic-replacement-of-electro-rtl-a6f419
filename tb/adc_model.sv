// adc_model: behavioural model of a 16-bit serial successive-approximation
// converter, for simulation only.
//
// The falling edge of scs takes the value on `value` as the sample. The
// converter then spends LEAD_BITS sclk periods acquiring (sdout low) and
// afterwards shifts the 16 result bits out MSB first, each one changed
// shortly after a falling sclk edge. sdout is low while scs is high. This is
// the bit timing that adc_ctrl expects.
`timescale 1ns/1ps
module adc_model #(
  parameter int unsigned LEAD_BITS = 6
) (
  input  logic        sclk,
  input  logic        scs,
  input  logic [15:0] value,
  output logic        sdout
);
  logic [15:0] held;
  int unsigned falls;

  initial begin
    sdout = 1'b0;
    falls = 0;
    held  = '0;
  end

  always @(negedge scs) begin
    held  = value;
    falls = 0;
    sdout = 1'b0;
  end

  always @(posedge scs) sdout = 1'b0;

  always @(negedge sclk) begin
    if (!scs) begin
      falls = falls + 1;
      if (falls >= LEAD_BITS && falls < LEAD_BITS + 16)
        sdout <= #1 held[15 - (falls - LEAD_BITS)];
      else
        sdout <= #1 1'b0;
    end
  end
endmodule
