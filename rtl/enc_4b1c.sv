// enc_4b1c -- 4B1C encoder for one data byte.
//
// Each 4-bit nibble of the byte is sent behind a complement bit that is the
// inverse of the nibble's first bit: code = {~d7, d7..d4, ~d3, d3..d0}, with
// code[9] sent first. The code bounds runs to five bits and never spreads one
// line error into two data bits. The nibble order and the position of the
// complement bits are this design's reading of the document's description of
// CK28.5; the code itself (4B1C) is the document's.
// Purely combinational, no latency.
module enc_4b1c
  import bic_phy_pkg::*;
(
  input  logic [7:0] data,
  output char_t      code
);
  always_comb code = enc4b1c(data);
endmodule
