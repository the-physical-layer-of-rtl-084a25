// hec_gen -- byte-serial generator of the cell header's HEC byte.
//
// The four header bytes arrive one at a time over the H-bus; each strobe
// ('en') folds one byte into a CRC-8 register (x^8 + x^2 + x + 1, MSB
// first). 'clr' starts a new header; a byte given together with 'clr' is the
// first byte of that header. 'hec' is the register XORed with the 0x55 coset
// and is valid the clock after the fourth byte. Computing the HEC while the
// bytes arrive, at the H-bus rate rather than the line rate, follows the
// document; the polynomial and coset are the B-ISDN ones (this design's
// choice, the document does not print them).
module hec_gen
  import bic_phy_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       en,
  input  logic [7:0] data,
  output logic [7:0] hec
);
  logic [7:0] crc_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   crc_q <= '0;
    else if (en)  crc_q <= crc8_byte(clr ? 8'h00 : crc_q, data);
    else if (clr) crc_q <= '0;

  assign hec = crc_q ^ HEC_COSET;
endmodule
