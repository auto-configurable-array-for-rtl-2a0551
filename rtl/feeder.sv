// feeder: preprocessing stage of the GCD array.
//
// The host shifts A and B in serially, least significant bit first, with
// `start_i` high for the whole frame. The feeder removes the common trailing
// zero bits of both operands: an OR of the two input bits, remembered in the
// flip-flop `found_q`, is ANDed with `start_i`, so the output frame `start_o`
// begins at the first bit pair that is not 0,0 and ends with the host frame.
// In that first clock the unit is instant-configured (icf) by the A bit: if it
// is 0 the operands are exchanged for the rest of the frame, so the A that
// leaves is always odd. Outside the host frame the outputs repeat the last
// bit of each output operand, i.e. its sign, so that later stages can read
// past the top of the frame.
//
// Interface: start_i/a_i/b_i serial in; start_o/a_o/b_o serial out.
// Timing: combinational from input to output (no latency); the output frame is
// shorter than the input frame by the number of common trailing zeros. A pair
// that is all zero produces no output frame.
// Zero-stripping and the a0-controlled exchange follow the published feeder;
// the sign repetition after the frame is this design's convention.
module feeder (
  input  logic clk,
  input  logic rst_n,
  input  logic start_i,
  input  logic a_i,
  input  logic b_i,
  output logic start_o,
  output logic a_o,
  output logic b_o
);

  logic found_q;    // a non-zero pair has been seen in this frame
  logic swap;       // exchange A and B for this frame
  logic a_sign_q;   // last output bits, repeated after the frame
  logic b_sign_q;
  logic a_sel, b_sel;

  assign start_o = start_i & (found_q | a_i | b_i);

  icf u_swap_cfg (
    .clk    (clk),
    .rst_n  (rst_n),
    .d      (~a_i),
    .enable (found_q),
    .q      (swap)
  );

  assign a_sel = swap ? b_i : a_i;
  assign b_sel = swap ? a_i : b_i;
  assign a_o   = start_i ? a_sel : a_sign_q;
  assign b_o   = start_i ? b_sel : b_sign_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      found_q  <= 1'b0;
      a_sign_q <= 1'b0;
      b_sign_q <= 1'b0;
    end else begin
      found_q <= start_o;
      if (start_i) begin
        a_sign_q <= a_sel;
        b_sign_q <= b_sel;
      end
    end
  end

endmodule
