// psr_pkg: types and constants shared by the phase sensitive relay blocks.
//
// The relay samples a rail signal and a reference signal at 3.6 kHz, keeps the
// last 720 samples of each, computes one DFT bin of each buffer, converts the
// two complex results to amplitude and phase with a CORDIC, and decides from
// the rail amplitude and the rail-to-reference phase difference whether the
// track section is free. The widths below (12-bit samples, 10-bit
// coefficients, 18-bit DFT results, 20-bit amplitude, 9-bit phase) and the
// controller's state list follow the published block diagrams; the sample
// coding and the phase scaling are choices of this design.
package psr_pkg;

  // Buffer and sample sizes
  localparam int unsigned BUF_LEN    = 720;  // samples per circular buffer
  localparam int unsigned SAMPLE_W   = 12;   // buffered sample width
  localparam int unsigned ADC_BITS   = 16;   // converter resolution
  localparam int unsigned COEF_W     = 10;   // windowed sin/cos coefficient width
  localparam int unsigned DFT_W      = 18;   // real / imaginary result width
  localparam int unsigned AMP_W      = 20;   // CORDIC amplitude width
  localparam int unsigned PHASE_W    = 9;    // CORDIC phase width (full turn = 2**PHASE_W)
  localparam int unsigned CORDIC_ITER = 13;  // micro-rotations per conversion

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [DFT_W-1:0]    dft_t;
  typedef logic        [AMP_W-1:0]    amp_t;
  typedef logic signed [PHASE_W-1:0]  phase_t;

  // Controller states, in the order they are visited once per sample period.
  // The number of clocks spent in each at 7.2 MHz is given in the comment.
  typedef enum logic [4:0] {
    ST_START,         // 1, after reset only
    ST_WAIT_DATA,     // until the next sample arrives (522 in steady state)
    ST_RAM_DATA,      // 1
    ST_RAM_WRITE,     // 1
    ST_DFT1_PRE,      // 1
    ST_DFT1,          // 720
    ST_DFT1_END,      // 1
    ST_DFT2_PRE,      // 1
    ST_DFT2,          // 720
    ST_DFT2_END,      // 1
    ST_CORDIC1_PRE,   // 1
    ST_CORDIC1,       // 13
    ST_CORDIC1_END,   // 1
    ST_CORDIC2_PRE,   // 1
    ST_CORDIC2,       // 13
    ST_CORDIC2_END,   // 1
    ST_THRESHOLD,     // 1
    ST_DELAY          // 1
  } state_t;

endpackage
