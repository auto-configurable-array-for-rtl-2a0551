// relay_buffer: pipeline register inside the cell array.
//
// Lines b0/b1 pass through every cell without a flip-flop (in a plus-minus
// cell they come out of the serial adder), so a long run of cells forms one
// long combinational path. This buffer, placed after a fixed number of cells,
// registers all five link lines by one clock. Because every line is delayed
// equally, the frame format is unchanged and the cells behind it see exactly
// what they would have seen without it, one clock later.
//
// Interface: link_i, link_o (gcd_pkg::link_t). Timing: one clock.
// Placing a buffer after a constant number of cells is the published remedy;
// registering all five lines is this design's reading of it.
module relay_buffer
  import gcd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  link_t link_i,
  output link_t link_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) link_o <= LINK_IDLE;
    else        link_o <= link_i;
  end

endmodule
