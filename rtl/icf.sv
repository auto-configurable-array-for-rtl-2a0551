// icf: instant-configure unit.
//
// Used where the configuration bit arrives in the same clock as the data it
// governs. While `enable` is low, `q` is `d` itself (a multiplexer path), so
// the computation in that clock is already configured; the flip-flop copies
// `q` every clock. The caller raises `enable` one clock after the
// configuration arrived and keeps it high while the configuration must stand;
// `q` then comes from the flip-flop.
//
// Interface: clk, rst_n (synchronous, active low), d, enable, q.
// Timing: q(t) = d(t) while enable(t) is low; q(t) = q(t-1) while it is high.
// The role of the unit is the published one; the multiplexer-plus-flip-flop
// structure and the reset are this design's choice.
module icf (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  input  logic enable,
  output logic q
);

  logic cfg_q;

  assign q = enable ? cfg_q : d;

  always_ff @(posedge clk) begin
    if (!rst_n) cfg_q <= 1'b0;
    else        cfg_q <= q;
  end

endmodule
