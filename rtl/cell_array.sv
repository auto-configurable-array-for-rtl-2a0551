// cell_array: the reduction array, a chain of identical configurable cells.
//
// NCELLS gcd_cell instances are chained link to link; each performs one
// reduction step (shift or plus-minus) on every operand pair that passes. A
// relay_buffer follows every BUF_EVERY-th cell (not the last one) to cut the
// combinational path along lines b0/b1. Frames flow in one direction only, so
// the array can be lengthened, or several arrays chained, without any change.
// An operand pair is reduced by NCELLS steps per pass; the frame arrives at
// link_o after (shift cells) + 2*(plus-minus cells) + (buffers) clocks.
//
// Interface: link_i, link_o (gcd_pkg::link_t); mode_o and plus_o give the
// configuration of every cell (bit i for cell i) for observation.
// Parameters: NCELLS (150, the number of cells reported for one chip),
// BUF_EVERY (cells between relay buffers; a design choice, 8).
module cell_array
  import gcd_pkg::*;
#(
  parameter int unsigned NCELLS    = 150,
  parameter int unsigned BUF_EVERY = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  link_t             link_i,
  output link_t             link_o,
  output logic [NCELLS-1:0] mode_o,
  output logic [NCELLS-1:0] plus_o
);

  link_t chain [NCELLS+1];   // chain[i]: input of cell i

  assign chain[0] = link_i;

  for (genvar i = 0; i < NCELLS; i++) begin : g_cell
    link_t cell_out;

    gcd_cell u_cell (
      .clk    (clk),
      .rst_n  (rst_n),
      .link_i (chain[i]),
      .link_o (cell_out),
      .mode_o (mode_o[i]),
      .plus_o (plus_o[i])
    );

    if (((i + 1) % BUF_EVERY == 0) && (i + 1 < NCELLS)) begin : g_buf
      relay_buffer u_buf (
        .clk    (clk),
        .rst_n  (rst_n),
        .link_i (cell_out),
        .link_o (chain[i+1])
      );
    end else begin : g_wire
      assign chain[i+1] = cell_out;
    end
  end

  assign link_o = chain[NCELLS];

endmodule
