// booth_mux_cell: one programmable Booth multiplexor of the partial product
// array.
//
// With row_sel = 1 the cell is a Booth multiplexor: it picks m (for |d| = 1)
// or m_x2 (the bit below, for |d| = 2), inverts it for a negative digit and
// inverts it once more when msb = 1. That one cell covers the regular
// multiplexor, the sign bit S, its complement S-bar (msb = 1) and the cell L
// at the bottom of a sub-word (m_x2 driven to 0). With row_sel = 0 the cell
// outputs lsb & inv_1: the previous row's negative-digit bit P (lsb = 1), or
// a masked 0 (lsb = 0). This is the programming of the document's cell table;
// the document builds the cell in dual-rail domino, here it is plain logic.
//
// Ports: sel carries the row's Booth digit; row_sel, msb, lsb are the mode
// controls; inv_1 is the previous row's neg; m and m_x2 are the multiplicand
// bits of this column and of the column below. Combinational.
module booth_mux_cell
  import pm_pkg::*;
(
  input  booth_sel_t sel,
  input  logic       row_sel,
  input  logic       msb,
  input  logic       lsb,
  input  logic       inv_1,
  input  logic       m,
  input  logic       m_x2,
  output logic       pp
);

  logic mux;

  always_comb begin
    mux = ((sel.one & m) | (sel.two & m_x2)) ^ sel.neg ^ msb;
    pp  = row_sel ? mux : (lsb & inv_1);
  end

endmodule
