// dft_point: one-bin discrete Fourier transform by multiply-accumulate.
//
// Computes X = sum_i x_i * (c_i - j*s_i) over one pass of a sample buffer,
// where c_i and s_i are the windowed cosine and sine coefficients from
// coef_rom. sum_reset clears both accumulators; in every cycle with sum_en
// high the current sample (ram_data) times the current coefficient pair is
// added to the real accumulator and subtracted from the imaginary one. With
// 12-bit samples, 10-bit coefficients and 720 terms the accumulators need
// 32 bits; the 18-bit results are the accumulators shifted right by SHIFT
// and saturated. SHIFT = 12 maps a full-scale 75 Hz sine (|X| about 73000)
// and the largest possible sum (about 93000) into the 18-bit range without
// saturation. The 18-bit output width is the published one; SHIFT and the
// saturation are this design's choices.
//
// Timing: one product per clock, no pipeline; dft_real / dft_imag follow the
// accumulators combinationally, so they are valid in the cycle after the
// last sum_en.
module dft_point
  import psr_pkg::*;
#(
  parameter int unsigned SHIFT = 12
) (
  input  logic    clk,
  input  logic    sum_reset,
  input  logic    sum_en,
  input  coef_t   cos_data,
  input  coef_t   sin_data,
  input  sample_t ram_data,
  output dft_t    dft_real,
  output dft_t    dft_imag
);
  localparam int unsigned ACC_W = SAMPLE_W + COEF_W + $clog2(BUF_LEN);
  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t acc_re, acc_im;
  logic signed [SAMPLE_W+COEF_W-1:0] p_re, p_im;

  assign p_re = ram_data * cos_data;
  assign p_im = ram_data * sin_data;

  always_ff @(posedge clk) begin
    if (sum_reset) begin
      acc_re <= '0;
      acc_im <= '0;
    end else if (sum_en) begin
      acc_re <= acc_re + ACC_W'(p_re);
      acc_im <= acc_im - ACC_W'(p_im);
    end
  end

  function automatic dft_t scale_sat(input acc_t a);
    acc_t s;
    s = a >>> SHIFT;
    if (s > acc_t'(2 ** (DFT_W - 1) - 1)) return dft_t'(2 ** (DFT_W - 1) - 1);
    if (s < -acc_t'(2 ** (DFT_W - 1)))    return dft_t'(-(2 ** (DFT_W - 1)));
    return dft_t'(s);
  endfunction

  assign dft_real = scale_sat(acc_re);
  assign dft_imag = scale_sat(acc_im);
endmodule
