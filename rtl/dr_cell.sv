// Dual-rail 2-input logic cell.
//
// One cell of the area-efficient dual-rail mapping: the true and false
// rails of a 2-input gate (AND, OR, XOR, NAND, NOR or XNOR, chosen at run
// time by `gate`) are produced together from the four input rails, so the
// whole cell is one 6-input LUT with two outputs (four rail inputs plus the
// gate selection) instead of two separate single-rail gates.  The cell is
// strongly indicating: y is NULL ({0,0}) while either input is NULL and
// becomes valid only when both are.  Purely combinational.
// The gate set follows the document; the minterm (DIMS) construction of
// each rail is this design's choice.
module dr_cell
  import aes_dr_pkg::*;
(
  input  gate_e gate,
  input  dr_t   a,
  input  dr_t   b,
  output dr_t   y
);
  always_comb y = dr_gate(gate, a, b);
endmodule
