// coef_rom: windowed cosine and sine coefficients of the one-point DFT.
//
// Entry i (0 <= i < N) holds
//   cos_data = round(SCALE * w(i) * cos(2*pi*K*i/N))
//   sin_data = round(SCALE * w(i) * sin(2*pi*K*i/N))
// with SCALE = 2**(COEF_W-1) - 1 and w the Kaiser window of shape beta = 2,
//   w(i) = I0(beta * sqrt(1 - (2i/(N-1) - 1)**2)) / I0(beta),
// where I0 is the zeroth-order modified Bessel function (summed here as its
// power series). N = 720 and beta = 2 are the published values; K = 15
// selects the 75 Hz bin (5 Hz per bin at 3.6 kHz over 720 samples); K = 55
// gives the 275 Hz variant. The table is computed at elaboration, so it is a
// constant ROM in the netlist.
//
// Timing: rom_reset reads entry 0 and points the address at entry 1; each
// rom_en reads the next entry. The outputs change one clock after the
// request, in step with sample_buffer, so the ROM and the buffer deliver
// matching pairs when driven by the same controls.
module coef_rom
  import psr_pkg::*;
#(
  parameter int unsigned N    = BUF_LEN,
  parameter int unsigned K    = 15,
  parameter real         BETA = 2.0
) (
  input  logic  clk,
  input  logic  rom_reset,
  input  logic  rom_en,
  output coef_t cos_data,
  output coef_t sin_data
);
  localparam real PI    = 3.14159265358979323846;
  localparam real SCALE = real'(2 ** (COEF_W - 1) - 1);
  localparam int unsigned AW = $clog2(N);

  typedef coef_t table_t [N];

  function automatic real bessel_i0(input real x);
    real sum, term;
    sum  = 1.0;
    term = 1.0;
    for (int m = 1; m < 30; m++) begin
      term = term * (x / (2.0 * m)) * (x / (2.0 * m));
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic real window(input int i);
    real u;
    u = 2.0 * i / (N - 1) - 1.0;
    return bessel_i0(BETA * $sqrt(1.0 - u * u)) / bessel_i0(BETA);
  endfunction

  function automatic table_t make_table(input bit sine);
    table_t t;
    real    arg;
    for (int i = 0; i < N; i++) begin
      arg  = 2.0 * PI * K * i / N;
      t[i] = coef_t'($rtoi($floor(SCALE * window(i) * (sine ? $sin(arg) : $cos(arg)) + 0.5)));
    end
    return t;
  endfunction

  localparam table_t COS_TAB = make_table(1'b0);
  localparam table_t SIN_TAB = make_table(1'b1);

  logic [AW-1:0] addr, raddr;

  assign raddr = rom_reset ? '0 : addr;

  always_ff @(posedge clk) begin
    if (rom_reset || rom_en) begin
      cos_data <= COS_TAB[raddr];
      sin_data <= SIN_TAB[raddr];
      addr     <= (raddr == AW'(N - 1)) ? '0 : raddr + 1'b1;
    end
  end
endmodule
