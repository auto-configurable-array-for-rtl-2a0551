// latch_buffer: serial-to-link buffer that follows the feeder.
//
// The reduction cells need bits p and p+1 of both operands in the same clock
// (b0 selects shift or plus-minus, a1 xor b1 selects plus or minus). Two
// flip-flops per data line do that: the first holds bit p+1 (lines a1, b1),
// the second bit p (lines a0, b0); `start` goes through two flip-flops too, so
// it is aligned with a0/b0. As a consequence line b1 carries bit 0 of B one
// clock before `start` rises, which is what the first cell's pre-configuration
// needs.
//
// Interface: start_i/a_i/b_i serial in, link_o (gcd_pkg::link_t) out.
// Timing: two clocks from a serial bit to line a0/b0, one clock to a1/b1.
// The purpose of the buffer is the published one; its exact flip-flop
// arrangement is this design's.
module latch_buffer
  import gcd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start_i,
  input  logic  a_i,
  input  logic  b_i,
  output link_t link_o
);

  logic start_q1, start_q2;
  logic a_q1, a_q2, b_q1, b_q2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {start_q1, start_q2, a_q1, a_q2, b_q1, b_q2} <= '0;
    end else begin
      start_q1 <= start_i;
      start_q2 <= start_q1;
      a_q1     <= a_i;
      a_q2     <= a_q1;
      b_q1     <= b_i;
      b_q2     <= b_q1;
    end
  end

  assign link_o = '{start: start_q2, a0: a_q2, a1: a_q1, b0: b_q2, b1: b_q1};

endmodule
