// tb_dec_4b1c -- checks the 4B1C decoder: every byte survives encode/decode,
// K28.5 and CK28.5 are flagged as code violations, a flipped complement bit
// is flagged without touching the data, and a flipped data bit gives exactly
// one wrong data bit (no error spreading).
module tb_dec_4b1c;
  import tb_ref_pkg::*;
  logic [9:0] code;
  logic [7:0] data;
  logic       viol;
  int checks = 0, failures = 0;

  dec_4b1c dut (.code(code), .data(data), .viol(viol));

  task automatic expect_eq(input logic [7:0] d, input logic v, input string what);
    checks++;
    if (data !== d || viol !== v) begin
      failures++;
      $display("FAIL %s: code %010b -> %02x/%0b exp %02x/%0b", what, code, data, viol, d, v);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      code = ref_enc(8'(v)); #1;
      expect_eq(8'(v), 1'b0, "clean");
      // complement bits: positions 1 and 6 -> vector bits 9 and 4
      code = ref_enc(8'(v)) ^ 10'b1000000000; #1;
      expect_eq(8'(v), 1'b1, "c1 flip");
      code = ref_enc(8'(v)) ^ 10'b0000010000; #1;
      expect_eq(8'(v), 1'b1, "c2 flip");
      for (int b = 0; b < 10; b++) begin
        if (b == 9 || b == 4) continue;
        code = ref_enc(8'(v)) ^ (10'd1 << b); #1;
        checks++;
        if ($countones(data ^ 8'(v)) != 1) begin
          failures++; $display("FAIL spread v=%02x bit %0d", v, b);
        end
      end
    end
    code = R_K285;  #1; checks++; if (!viol) failures++;
    code = R_CK285; #1; checks++; if (!viol) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
