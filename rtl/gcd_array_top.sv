// gcd_array_top: pass-through coprocessor for the greatest common divisor.
//
// The host shifts an operand pair in serially, least significant bit first,
// in a frame of W bits marked by start_i (two's complement, top bit a sign
// bit, so W = n+1 for positive n-bit operands). The pair flows through
//   feeder        drops the common trailing zeros, makes A odd
//   latch_buffer  forms the two-bits-per-clock link
//   cell_array    NCELLS reduction steps of the plus-minus algorithm
//   postproc      returns A and B serially, flags B = 0 and the sign of A
// and leaves on start_o/a_o/b_o in a frame of the same length as the one
// that entered the array. If b_zero_o is set with done_o, |A| is the GCD of
// the odd parts (the host restores the common power of two it sent); if not,
// the host sends A and B through again. The length of the array does not
// limit the operand length; it only sets how many steps one pass does.
//
// Consecutive operand pairs must be separated by at least NCELLS+4 idle
// clocks. Latency of a pass: 2 (latch buffer) + number of relay buffers +
// one clock per shift cell + two per plus-minus cell.
//
// Parameters: NCELLS (150, as placed on one chip), BUF_EVERY (8, assumed).
module gcd_array_top
  import gcd_pkg::*;
#(
  parameter int unsigned NCELLS    = 150,
  parameter int unsigned BUF_EVERY = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic              a_i,
  input  logic              b_i,
  output logic              start_o,
  output logic              a_o,
  output logic              b_o,
  output logic              done_o,
  output logic              b_zero_o,
  output logic              a_neg_o,
  output logic [NCELLS-1:0] mode_o,
  output logic [NCELLS-1:0] plus_o
);

  logic  f_start, f_a, f_b;
  link_t array_in, array_out;

  feeder u_feeder (
    .clk     (clk),
    .rst_n   (rst_n),
    .start_i (start_i),
    .a_i     (a_i),
    .b_i     (b_i),
    .start_o (f_start),
    .a_o     (f_a),
    .b_o     (f_b)
  );

  latch_buffer u_latch (
    .clk     (clk),
    .rst_n   (rst_n),
    .start_i (f_start),
    .a_i     (f_a),
    .b_i     (f_b),
    .link_o  (array_in)
  );

  cell_array #(
    .NCELLS    (NCELLS),
    .BUF_EVERY (BUF_EVERY)
  ) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .link_i (array_in),
    .link_o (array_out),
    .mode_o (mode_o),
    .plus_o (plus_o)
  );

  postproc u_post (
    .clk      (clk),
    .rst_n    (rst_n),
    .link_i   (array_out),
    .start_o  (start_o),
    .a_o      (a_o),
    .b_o      (b_o),
    .done_o   (done_o),
    .b_zero_o (b_zero_o),
    .a_neg_o  (a_neg_o)
  );

endmodule
