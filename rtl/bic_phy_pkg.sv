// bic_phy_pkg -- shared types, constants and functions of the BIC-LAN
// physical layer (transmission convergence sublayer).
//
// Cell: 53 characters on the line, a 5-byte header (four ATM header bytes
// plus the HEC byte) followed by a 48-byte payload. All characters are
// 10-bit transmission characters; vector bit [9] is the first code bit sent
// (Fibre Channel bit 'a').
//
// User bytes use the 4B1C code: each 4-bit nibble is preceded by a
// complement bit equal to the inverse of the nibble's first bit, giving
// {~d7, d7..d4, ~d3, d3..d0}. Runs are at most five bits long and a single
// line error stays a single data-bit error after decoding, which keeps the
// header's single-error correction useful. The layout (complement bits at
// code positions 1 and 6) is this design's reading of the rule that CK28.5
// has its sixth bit complementary to its seventh.
//
// Idle cells are built from K28.5 (0011111010, the negative-disparity form)
// and CK28.5 (K28.5 with code bit 6 inverted): four K28.5, one CK28.5 in the
// HEC slot (this design's choice), then twelve blocks K28.5 CK CK CK.
//
// HEC: CRC-8, generator x^8 + x^2 + x + 1, processed MSB first, remainder
// XORed with 0x55. The polynomial and coset are the B-ISDN ones; the
// document names the HEC but not its polynomial.
package bic_phy_pkg;

  localparam int CELL_BYTES    = 53;
  localparam int HDR_BYTES     = 5;   // four header bytes + HEC
  localparam int HDR_INFO      = 4;
  localparam int PAYLOAD_BYTES = 48;
  localparam int HUNT_K        = 4;   // consecutive K28.5 that start PRESYNC

  typedef logic [9:0] char_t;
  typedef logic [5:0] pos_t;          // character position in a cell, 0..52

  localparam char_t K285  = 10'b0011111010;
  localparam char_t CK285 = 10'b0011101010;

  localparam logic [7:0] HEC_COSET = 8'h55;

  typedef enum logic [1:0] {HUNT = 2'd0, PRESYNC = 2'd1, SYNC = 2'd2} sync_state_t;

  function automatic char_t enc4b1c(input logic [7:0] d);
    return {~d[7], d[7:4], ~d[3], d[3:0]};
  endfunction

  function automatic logic [7:0] dec4b1c(input char_t c);
    return {c[8:5], c[3:0]};
  endfunction

  function automatic logic viol4b1c(input char_t c);
    return (c[9] == c[8]) || (c[4] == c[3]);
  endfunction

  // one byte into the CRC-8 register (no coset)
  function automatic logic [7:0] crc8_byte(input logic [7:0] crc, input logic [7:0] d);
    logic [7:0] r;
    r = crc ^ d;
    for (int i = 0; i < 8; i++)
      r = r[7] ? ((r << 1) ^ 8'h07) : (r << 1);
    return r;
  endfunction

  // CRC-8 of a 32-bit header, byte [31:24] first (no coset)
  function automatic logic [7:0] crc8_hdr(input logic [31:0] h);
    logic [7:0] r;
    r = 8'h00;
    for (int b = 3; b >= 0; b--)
      r = crc8_byte(r, h[8*b +: 8]);
    return r;
  endfunction

  // character of an idle cell at position p
  function automatic char_t idle_char(input pos_t p);
    if (p < pos_t'(HDR_INFO))  return K285;
    if (p == pos_t'(HDR_INFO)) return CK285;
    return ((p - pos_t'(HDR_BYTES)) % 4 == 0) ? K285 : CK285;
  endfunction

endpackage
