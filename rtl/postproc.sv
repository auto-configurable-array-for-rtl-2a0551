// postproc: termination and sign detection at the end of the array.
//
// The array leaves each operand pair in its five-line link format. This stage
// returns it to the host as plain serial streams (a_o, b_o, LSB first, framed
// by start_o) so that an unfinished pair can be fed in again, and evaluates
// the frame on the fly: b_zero accumulates the AND of the inverted B bits,
// and the A bit of the last frame position, the sign of A in two's
// complement, is kept. In the second clock after the last frame clock, done_o
// pulses for one clock, with
// b_zero_o (B is zero: A is the greatest common divisor of the odd parts, or
// its negative) and a_neg_o (A is negative).
//
// Interface: link_i in; start_o, a_o, b_o, done_o, b_zero_o, a_neg_o out.
// Timing: serial outputs are combinational from link_i; done_o two clocks
// after the last frame clock; b_zero_o/a_neg_o are set with it and hold until
// the next frame ends.
// Lines a1/b1 of the link are not needed here and stay unconnected inside.
// Only the existence of a simple post-processing circuit for these two
// detections is published; this circuit is this design's.
module postproc
  import gcd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  link_t link_i,
  output logic  start_o,
  output logic  a_o,
  output logic  b_o,
  output logic  done_o,
  output logic  b_zero_o,
  output logic  a_neg_o
);

  logic start_q, zero_acc, sign_acc;

  assign start_o = link_i.start;
  assign a_o     = link_i.a0;
  assign b_o     = link_i.b0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start_q  <= 1'b0;
      zero_acc <= 1'b0;
      sign_acc <= 1'b0;
      done_o   <= 1'b0;
      b_zero_o <= 1'b0;
      a_neg_o  <= 1'b0;
    end else begin
      start_q <= link_i.start;
      done_o  <= start_q & ~link_i.start;
      if (link_i.start) begin
        zero_acc <= (start_q ? zero_acc : 1'b1) & ~link_i.b0;
        sign_acc <= link_i.a0;
      end
      if (start_q & ~link_i.start) begin
        b_zero_o <= zero_acc;
        a_neg_o  <= sign_acc;
      end
    end
  end

endmodule
