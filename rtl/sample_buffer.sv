// sample_buffer: circular buffer of the most recent LEN samples (RAM1, RAM2).
//
// One instance holds the rail samples and one the reference samples. A write
// (ram_en with ram_rd_wr low) stores din over the oldest sample and advances
// the write pointer, so after a write the write pointer again points at the
// oldest sample. A read pass starts with ram_home, which reads the oldest
// sample and points the read pointer at the next one; each further read
// (ram_en with ram_rd_wr high) returns the next older-to-newer sample. Reads
// are synchronous: dout changes one clock after the request. ram_read_end is
// high while dout holds the LEN-th (newest) sample of the pass.
//
// The published design gives the size (720 x 12 bit), circular operation and
// the control signal names; the pointer scheme, the polarity of ram_rd_wr
// (high = read) and the home-prefetch are choices of this design. Until LEN
// samples have been written after reset, locations never written read as
// zero, so the first DFTs see a zero-padded history instead of whatever the
// RAM held at power-up.
module sample_buffer
  import psr_pkg::*;
#(
  parameter int unsigned LEN = BUF_LEN
) (
  input  logic    clk,
  input  logic    reset,
  input  logic    ram_en,
  input  logic    ram_rd_wr,     // 1: read, 0: write
  input  logic    ram_home,      // start a read pass at the oldest sample
  input  sample_t din,
  output sample_t dout,
  output logic    ram_read_end
);
  localparam int unsigned AW = $clog2(LEN);
  localparam int unsigned CW = $clog2(LEN + 1);
  typedef logic [AW-1:0] addr_t;

  sample_t mem [LEN];
  sample_t mem_q;
  addr_t   wptr, rptr, raddr;
  logic [CW-1:0] filled;   // samples written since reset, saturates at LEN
  logic [CW-1:0] rcnt;     // samples delivered in this read pass
  logic          rd;

  function automatic addr_t next(input addr_t a);
    return (a == addr_t'(LEN - 1)) ? '0 : a + 1'b1;
  endfunction

  assign rd    = ram_home || (ram_en && ram_rd_wr);
  assign raddr = ram_home ? wptr : rptr;

  // storage and synchronous read port
  always_ff @(posedge clk) begin
    if (ram_en && !ram_rd_wr && !ram_home) mem[wptr] <= din;
    if (rd) mem_q <= mem[raddr];
  end

  // pointers and counters
  always_ff @(posedge clk) begin
    if (reset) begin
      wptr   <= '0;
      rptr   <= '0;
      filled <= '0;
      rcnt   <= '0;
    end else if (ram_home) begin
      rptr <= next(wptr);
      rcnt <= CW'(1);
    end else if (ram_en && ram_rd_wr) begin
      rptr <= next(rptr);
      if (rcnt != CW'(LEN)) rcnt <= rcnt + 1'b1;
    end else if (ram_en) begin
      wptr <= next(wptr);
      if (filled != CW'(LEN)) filled <= filled + 1'b1;
    end
  end

  assign ram_read_end = (rcnt == CW'(LEN));

  // Zero-padding of the not yet written history: a pass delivers the
  // (LEN - filled) unwritten locations first; rcnt numbers the sample on dout.
  assign dout = (32'(rcnt) + 32'(filled) <= 32'(LEN)) ? '0 : mem_q;
endmodule
