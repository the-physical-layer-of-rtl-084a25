// idle_cell_gen -- character generator for idle cells.
//
// Given the character position of the cell being sent (0..52) it returns the
// idle-cell character: K28.5 at positions 0-3 (the four header bytes, as the
// document specifies), CK28.5 at position 4 (the HEC slot; this design's
// choice, so that four K28.5 in a row mark only the start of an idle cell),
// and in the payload twelve blocks of K28.5 CK28.5 CK28.5 CK28.5 (document).
// Idle cells carry no 4B1C data and are recognised by the receiver from
// these patterns. Purely combinational.
module idle_cell_gen
  import bic_phy_pkg::*;
(
  input  pos_t  pos,
  output char_t code
);
  always_comb code = idle_char(pos);
endmodule
