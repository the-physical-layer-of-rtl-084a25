// tb_ref_pkg -- reference functions for the testbenches, written apart from
// the RTL package: CRC-8 by long division, the 4B1C code by code-position
// table, and the idle-cell pattern as literal characters.
package tb_ref_pkg;

  localparam logic [9:0] R_K285  = 10'b0011111010;
  localparam logic [9:0] R_CK285 = 10'b0011101010;

  // HEC: remainder of header * x^8 divided by x^8+x^2+x+1, XOR 0x55
  function automatic logic [7:0] ref_hec(input logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--)
      if (r[i]) r = r ^ (40'h107 << (i - 8));
    return r[7:0] ^ 8'h55;
  endfunction

  // 4B1C: code position 1 is sent first and is vector bit 9
  function automatic logic [9:0] ref_enc(input logic [7:0] d);
    logic [9:0] c;
    for (int p = 1; p <= 10; p++) begin
      logic b;
      case (p)
        1: b = !d[7];
        6: b = !d[3];
        default: b = (p < 6) ? d[7 - (p - 2)] : d[3 - (p - 7)];
      endcase
      c[10 - p] = b;
    end
    return c;
  endfunction

  function automatic logic [9:0] ref_idle(input int p);
    if (p < 4) return R_K285;
    if (p == 4) return R_CK285;
    return ((p - 5) % 4 == 0) ? R_K285 : R_CK285;
  endfunction

endpackage
