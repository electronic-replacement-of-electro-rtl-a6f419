// cordic: iterative vectoring CORDIC, rectangular to polar conversion.
//
// Converts the complex DFT result (crd_x, crd_y) to an amplitude and a phase
// with ITER micro-rotations, one per clock. Each micro-rotation j turns the
// vector by -sigma*atan(2**-j) using only shifts and additions:
//   x' = x + sigma * (y >>> j)
//   y' = y - sigma * (x >>> j)
//   z' = z + sigma * atan(2**-j),   sigma = +1 if y >= 0, else -1
// so that y is driven to zero, z collects the vector's angle and x grows to
// K*|v| with K ~ 1.64676. The amplitude is not divided by K: the thresholds
// that follow are set for the scaled value. Because micro-rotations only
// cover about +-100 degrees, the start cycle first turns a vector in the left
// half-plane by +-90 degrees (exact, by swapping x and y).
//
// The 13 iterations, the 18-bit inputs, the 20-bit amplitude and the 9-bit
// phase are the published figures. The rest is this design's choice: two
// guard bits below the input LSB, a 16-bit angle accumulator in units of
// 1/65536 turn, and a phase output rounded to 1/512 turn (0.703 degree),
// two's complement, so -256..255 covers -180..+180 degrees.
//
// Timing: crd_start (one cycle) loads the operands. Each following cycle with
// crd_en applies one micro-rotation; crd_done is high in the cycle of the
// last one, and crd_amp / crd_phase are valid from the next cycle until the
// next crd_start. A conversion therefore takes 1 + ITER cycles.
module cordic
  import psr_pkg::*;
#(
  parameter int unsigned ITER = CORDIC_ITER
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   crd_en,
  input  logic   crd_start,
  input  dft_t   crd_x,
  input  dft_t   crd_y,
  output logic   crd_done,
  output amp_t   crd_amp,
  output phase_t crd_phase
);
  localparam int unsigned GUARD = 2;
  localparam int unsigned XW    = AMP_W + GUARD;   // holds K*sqrt(2)*2**17 << GUARD
  localparam int unsigned ANG_W = 16;              // 2**ANG_W = one full turn

  typedef logic signed [XW-1:0]    xy_t;
  typedef logic signed [ANG_W-1:0] ang_t;

  // atan(2**-j) in units of 1/65536 turn
  function automatic ang_t atan_tab(input int unsigned j);
    case (j)
      0:  return ang_t'(8192);
      1:  return ang_t'(4836);
      2:  return ang_t'(2555);
      3:  return ang_t'(1297);
      4:  return ang_t'(651);
      5:  return ang_t'(326);
      6:  return ang_t'(163);
      7:  return ang_t'(81);
      8:  return ang_t'(41);
      9:  return ang_t'(20);
      10: return ang_t'(10);
      11: return ang_t'(5);
      12: return ang_t'(3);
      13: return ang_t'(1);
      default: return ang_t'(0);
    endcase
  endfunction

  xy_t  x, y, x0, y0;
  ang_t z;
  logic [$clog2(ITER+1)-1:0] iter;
  logic busy;

  assign x0 = xy_t'(crd_x) <<< GUARD;
  assign y0 = xy_t'(crd_y) <<< GUARD;

  always_ff @(posedge clk) begin
    if (reset) begin
      x    <= '0;
      y    <= '0;
      z    <= '0;
      iter <= '0;
      busy <= 1'b0;
    end else if (crd_start) begin
      iter <= '0;
      busy <= 1'b1;
      if (!x0[XW-1]) begin
        x <= x0;  y <= y0;  z <= '0;
      end else if (!y0[XW-1]) begin
        x <= y0;  y <= -x0; z <= ang_t'(2 ** (ANG_W - 2));      // +90 degrees
      end else begin
        x <= -y0; y <= x0;  z <= -ang_t'(2 ** (ANG_W - 2));     // -90 degrees
      end
    end else if (crd_en && busy) begin
      if (!y[XW-1]) begin
        x <= x + (y >>> iter);
        y <= y - (x >>> iter);
        z <= z + atan_tab(32'(iter));
      end else begin
        x <= x - (y >>> iter);
        y <= y + (x >>> iter);
        z <= z - atan_tab(32'(iter));
      end
      iter <= iter + 1'b1;
      if (iter == ($bits(iter))'(ITER - 1)) busy <= 1'b0;
    end
  end

  assign crd_done  = busy && crd_en && (iter == ($bits(iter))'(ITER - 1));
  assign crd_amp   = amp_t'(x >>> GUARD);
  assign crd_phase = phase_t'((z + ang_t'(2 ** (ANG_W - PHASE_W - 1))) >>> (ANG_W - PHASE_W));

  initial assert (ITER >= 1 && ITER <= 14) else $error("ITER must be 1..14");
endmodule
