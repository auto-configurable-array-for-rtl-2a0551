// gcd_cell: one auto-configurable reduction cell of the plus-minus GCD array.
//
// Each cell performs one reduction step on the operand pair streaming through
// it, least significant bit first (link format in gcd_pkg):
//   b0 = 0 : shift       B <- B/2
//   b0 = 1 : plus-minus  (A, B) <- (B, (A + B)/4) if a1 != b1
//                                  (B, (A - B)/4) otherwise
// A is odd on entry and stays odd, so the sums are exact multiples of 4.
//
// Configuration. Bit b0 of the frame arrives on line b1 one clock before
// `start` rises; a pcf unit latches it and keeps the cell in shift or
// plus-minus mode for the whole frame. a1 xor b1 is only known in the first
// clock of the frame, so an icf unit passes it straight to the adder in that
// clock and holds it afterwards.
//
// Shift. The cell delays `start` and the A lines by one flip-flop and passes
// B through: relative to the frame, B moves down one position.
// Plus-minus. The old B becomes the new A, delayed by two flip-flops, and so
// does `start`; a serial adder/subtractor with its carry (borrow) in a
// flip-flop adds or subtracts B and A and drives the new B lines. It produces
// the sum bits p and p+1 in every clock (lines b0 and b1), so the two low sum
// bits, which are zero, fall before the delayed frame starts: the sum is
// divided by 4. Subtraction is A + ~B + 1, with the carry preset to 1.
//
// Outside the frame. For two clocks after its output frame the cell drives
// the sign of the new A on a0/a1 and of the new B on b0/b1, since the next
// cell reads up to two bit positions beyond the frame. Both configuration
// units hold until that cell has finished, so a following frame must leave
// three idle clocks at the cell input; an assertion checks this.
//
// Interface: link_i, link_o (gcd_pkg::link_t); mode_o (1 = plus-minus) and
// plus_o (1 = add) show the configuration. Timing: one clock of latency in
// shift mode, two in plus-minus mode; b0/b1 are combinational through the cell.
// The two operations, the configuration by b0 and by a1 xor b1, and the
// delays are the published cell; the two-bit-per-clock adder, the sign
// extension and the hold windows of the configuration units are this
// design's.
module gcd_cell
  import gcd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  link_t link_i,
  output link_t link_o,
  output logic  mode_o,
  output logic  plus_o
);

  logic start_d1, start_d2;   // input START delayed one and two clocks
  logic pcf_en, icf_en, pcf_en_q;
  logic mode;                 // 1: plus-minus, 0: shift
  logic plus;                 // 1: A + B, 0: A - B
  logic first;                // first clock of the input frame

  // delayed input lines
  logic a0_d1, a1_d1, b0_d1, b0_d2;

  // serial adder
  logic carry_q, c0, c1, bx0, bx1, s0, s1;  // c0/c1: carry into p/p+1

  // outputs before sign extension
  link_t calc;
  logic  out_d1, out_d2, tail;
  logic  a_sign_q, b_sign_q;

  assign pcf_en = link_i.start | start_d1 | start_d2;
  assign icf_en = start_d1 | start_d2;
  assign first  = link_i.start & ~start_d1;

  pcf u_mode_cfg (
    .clk    (clk),
    .rst_n  (rst_n),
    .d      (link_i.b1),
    .enable (pcf_en),
    .q      (mode)
  );

  icf u_sign_cfg (
    .clk    (clk),
    .rst_n  (rst_n),
    .d      (link_i.a1 ^ link_i.b1),
    .enable (icf_en),
    .q      (plus)
  );

  // sum bits p and p+1 each clock; the carry into p+1 is kept for the next
  // clock, which recomputes bit p+1 as its bit p
  always_comb begin
    c0  = first ? ~plus : carry_q;
    bx0 = link_i.b0 ^ ~plus;
    bx1 = link_i.b1 ^ ~plus;
    s0  = link_i.a0 ^ bx0 ^ c0;
    c1  = (link_i.a0 & bx0) | (link_i.a0 & c0) | (bx0 & c0);
    s1  = link_i.a1 ^ bx1 ^ c1;
  end

  always_comb begin
    if (mode) begin
      calc = '{start: start_d2, a0: b0_d2, a1: b0_d1, b0: s0, b1: s1};
    end else begin
      calc = '{start: start_d1, a0: a0_d1, a1: a1_d1,
               b0: link_i.b0, b1: link_i.b1};
    end
  end

  assign tail = ~calc.start & (out_d1 | out_d2);

  always_comb begin
    if (tail) link_o = '{start: 1'b0, a0: a_sign_q, a1: a_sign_q,
                         b0: b_sign_q, b1: b_sign_q};
    else      link_o = calc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {start_d1, start_d2, pcf_en_q} <= '0;
      {a0_d1, a1_d1, b0_d1, b0_d2}   <= '0;
      {carry_q, out_d1, out_d2}      <= '0;
      {a_sign_q, b_sign_q}           <= '0;
    end else begin
      start_d1 <= link_i.start;
      start_d2 <= start_d1;
      pcf_en_q <= pcf_en;
      a0_d1    <= link_i.a0;
      a1_d1    <= link_i.a1;
      b0_d1    <= link_i.b0;
      b0_d2    <= b0_d1;
      carry_q  <= c1;
      out_d1   <= calc.start;
      out_d2   <= out_d1;
      if (calc.start) begin
        a_sign_q <= calc.a0;
        b_sign_q <= calc.b0;
      end
    end
  end

  assign mode_o = mode;
  assign plus_o = plus;

  // A frame may only start when the previous one has left the cell.
  always_ff @(posedge clk) begin
    if (rst_n && first) begin
      assert (!pcf_en_q)
        else $error("gcd_cell: frame started less than three clocks after the previous one");
    end
  end

endmodule
