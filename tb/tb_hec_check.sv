// tb_hec_check -- HEC validation: clean headers give no error; every single
// flipped bit of the 40-bit header+HEC is located (byte, bit, XOR mask) and
// marked correctable; random double errors are detected and not correctable.
module tb_hec_check;
  import tb_ref_pkg::*;
  logic [31:0] hdr, mask;
  logic [7:0]  hec, syndrome;
  logic        err, correctable;
  logic [1:0]  err_byte;
  logic [2:0]  err_bit;
  int checks = 0, failures = 0;

  hec_check dut (.hdr, .hec, .syndrome, .err, .correctable, .err_byte, .err_bit, .mask);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] h;
    logic [39:0] cw, e;
    for (int n = 0; n < 200; n++) begin
      h = $urandom;
      cw = {h, ref_hec(h)};
      {hdr, hec} = cw; #1;
      checks++;
      if (err || correctable || mask != 0) begin failures++; $display("FAIL clean %08x", h); end
      for (int i = 0; i < 40; i++) begin
        {hdr, hec} = cw ^ (40'd1 << i); #1;
        checks++;
        if (!err || !correctable) begin failures++; $display("FAIL single %0d not corrected", i); end
        else if (i >= 8) begin
          checks++;
          if (mask != (32'd1 << (i - 8)) || err_byte != 2'(3 - (i - 8) / 8) || err_bit != 3'((i - 8) % 8)
              || (hdr ^ mask) != h) begin
            failures++; $display("FAIL locate %0d: mask %08x byte %0d bit %0d", i, mask, err_byte, err_bit);
          end
        end else begin
          checks++;
          if (mask != 0) failures++;
        end
      end
      for (int k = 0; k < 20; k++) begin
        int a, b;
        a = $urandom_range(39); b = $urandom_range(39);
        if (a == b) continue;
        e = (40'd1 << a) | (40'd1 << b);
        {hdr, hec} = cw ^ e; #1;
        checks++;
        if (!err || correctable) begin failures++; $display("FAIL double %0d %0d", a, b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
