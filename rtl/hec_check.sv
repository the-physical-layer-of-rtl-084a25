// hec_check -- HEC validation and single-bit error location for a received
// cell header.
//
// The syndrome is CRC-8(header) ^ 0x55 ^ received HEC; zero means no error.
// Because the CRC is linear, a single flipped header bit i gives the syndrome
// CRC-8(1 << i), and a flipped HEC bit k gives (1 << k). The 40 possible
// single-error syndromes are distinct, so a match locates the error: the
// byte number and bit position come out as err_byte / err_bit and as a
// one-hot 32-bit XOR mask that the receiver applies to the header while it
// hands it to the ATM layer (the document's XOR-gate plane). A non-zero
// syndrome that matches no single error means more than one error and the
// cell must be discarded. Purely combinational; the constant syndromes fold
// away at elaboration.
module hec_check
  import bic_phy_pkg::*;
(
  input  logic [31:0] hdr,          // header bytes 1..4, byte 1 in [31:24]
  input  logic [7:0]  hec,
  output logic [7:0]  syndrome,
  output logic        err,
  output logic        correctable,  // exactly one bit in error (header or HEC)
  output logic [1:0]  err_byte,     // 0 = first header byte
  output logic [2:0]  err_bit,      // 7 = MSB of that byte
  output logic [31:0] mask
);
  always_comb begin
    syndrome    = crc8_hdr(hdr) ^ HEC_COSET ^ hec;
    err         = (syndrome != 8'h00);
    mask        = '0;
    correctable = 1'b0;
    err_byte    = '0;
    err_bit     = '0;
    for (int i = 0; i < 32; i++)
      if (err && syndrome == crc8_hdr(32'(1) << i)) begin
        mask[i]     = 1'b1;
        correctable = 1'b1;
        err_byte    = 2'(3 - i / 8);
        err_bit     = 3'(i % 8);
      end
    if (err && $countones(syndrome) == 1)
      correctable = 1'b1;               // error in the HEC byte itself
  end
endmodule
