// pull_drop: programmable pull time and drop time of the relay output.
//
// Two saturating counters follow the track-free decision (din), advancing
// once per pd_clk enable (once per 3.6 kHz sample period in the relay). The
// True counter counts up while din is 1 and down while it is 0; the False
// counter does the opposite. Neither wraps: True stays within 0..pull and
// False within 0..drop. The output goes to 1 when the True counter reaches
// pull and to 0 when the False counter reaches drop; otherwise it holds.
// This is the published circuit. With a 3.6 kHz tick, pull = 504..36000
// gives the published pull-time range of 140 ms..10 s, and drop = 360 the
// fixed 100 ms drop time.
//
// The counter width (16 bits), the use of a clock enable instead of a
// separate pd_clk clock, and the reset state (output 0, the safe "occupied"
// state, both counters 0) are this design's choices. pull and drop should be
// at least 1.
//
// Timing: with din steady, the output changes in the cycle after the pull-th
// (drop-th) tick counted from the last zero of the counter concerned.
module pull_drop #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             pd_clk,   // count enable, one cycle per tick
  input  logic [CNT_W-1:0] pull,     // pull time in ticks
  input  logic [CNT_W-1:0] drop,     // drop time in ticks
  input  logic             din,      // 1: track free
  output logic             dout      // relay output, 1: track free
);
  typedef logic [CNT_W-1:0] cnt_t;
  cnt_t true_cnt, false_cnt, true_nxt, false_nxt;

  function automatic cnt_t step(input cnt_t c, input cnt_t lim, input logic up);
    if (up)            return (c >= lim) ? lim : c + 1'b1;
    else if (c != '0)  return c - 1'b1;
    else               return c;
  endfunction

  assign true_nxt  = step(true_cnt,  pull, din);
  assign false_nxt = step(false_cnt, drop, !din);

  always_ff @(posedge clk) begin
    if (reset) begin
      true_cnt  <= '0;
      false_cnt <= '0;
      dout      <= 1'b0;
    end else if (pd_clk) begin
      true_cnt  <= true_nxt;
      false_cnt <= false_nxt;
      if (false_nxt == drop)     dout <= 1'b0;
      else if (true_nxt == pull) dout <= 1'b1;
    end
  end
endmodule
