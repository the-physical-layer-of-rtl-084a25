// dec_4b1c -- 4B1C decoder for one received character.
//
// Drops the two complement bits of a 10-bit character (code[9] and code[4])
// and returns the data byte {code[8:5], code[3:0]}. 'viol' is high when a
// complement bit equals the bit it should complement, as it does in the K28.5
// and CK28.5 characters of idle cells or after a line error in a complement
// bit; it is for monitoring and is this design's addition.
// Purely combinational, no latency.
module dec_4b1c
  import bic_phy_pkg::*;
(
  input  char_t      code,
  output logic [7:0] data,
  output logic       viol
);
  always_comb begin
    data = dec4b1c(code);
    viol = viol4b1c(code);
  end
endmodule
