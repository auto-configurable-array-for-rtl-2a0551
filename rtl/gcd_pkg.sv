// gcd_pkg: types shared by the blocks of the bit-serial plus-minus GCD array.
//
// Every stage of the array talks over the same five-wire link. Numbers travel
// least significant bit first, in two's complement, inside a frame marked by
// `start`. While `start` is high in clock t of a frame (position p = t - t0),
// a0/b0 carry bit p of A/B and a1/b1 carry bit p+1, so a stage sees two
// neighbouring bits at once. One clock before `start` rises, b1 already carries
// bit 0 of B: that is the bit that pre-configures the next cell. For two clocks
// after the frame every data line carries the sign bit of its operand.
// The five-line format follows the lines named A0/A1/B0/B1 and START in the
// description of the array; the sign-extension convention is this design's.
package gcd_pkg;

  typedef struct packed {
    logic start;  // frame flag
    logic a0;     // A bit p
    logic a1;     // A bit p+1
    logic b0;     // B bit p
    logic b1;     // B bit p+1
  } link_t;

  localparam link_t LINK_IDLE = '0;

endpackage
