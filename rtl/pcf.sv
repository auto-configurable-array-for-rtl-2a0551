// pcf: pre-configure unit.
//
// Used where the configuration bit reaches a cell one clock before the data it
// governs. While `enable` is low the flip-flop follows `d`; from the clock in
// which `enable` rises it holds, so `q` presents the value `d` had in the last
// clock before `enable` rose, for as long as `enable` stays high. `q` comes
// straight from the flip-flop, so the configuration adds no combinational
// delay to the computation it steers.
//
// Interface: clk, rst_n (synchronous, active low, clears the flip-flop),
// d, enable, q. Timing: q(t) = d(t-1) while enable(t-1) was low.
// The role of the unit (configuration one clock early, ENABLE marking the
// computation) is the published one; the flip-flop-with-hold structure and the
// reset are this design's choice.
module pcf (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  input  logic enable,
  output logic q
);

  logic cfg_q;

  always_ff @(posedge clk) begin
    if (!rst_n)       cfg_q <= 1'b0;
    else if (!enable) cfg_q <= d;
  end

  assign q = cfg_q;

endmodule
