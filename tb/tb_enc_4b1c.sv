// tb_enc_4b1c -- exhaustive check of the 4B1C encoder against the reference
// code table, the complement-bit rule, distinctness from K28.5/CK28.5 and the
// five-bit run-length bound over a random coded byte stream.
module tb_enc_4b1c;
  import tb_ref_pkg::*;
  logic [7:0] data;
  logic [9:0] code;
  int checks = 0, failures = 0;

  enc_4b1c dut (.data(data), .code(code));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run, maxrun;
    logic last;
    for (int v = 0; v < 256; v++) begin
      data = 8'(v); #1;
      checks++;
      if (code !== ref_enc(data)) begin
        failures++; $display("FAIL enc %02x -> %03x exp %03x", data, code, ref_enc(data));
      end
      checks++;
      if (code[9] == code[8] || code[4] == code[3] || code == R_K285 || code == R_CK285) failures++;
    end
    run = 0; maxrun = 0; last = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      data = 8'($urandom); #1;
      for (int b = 9; b >= 0; b--) begin
        if (n == 0 && b == 9) run = 1;
        else run = (code[b] == last) ? run + 1 : 1;
        last = code[b];
        if (run > maxrun) maxrun = run;
      end
    end
    checks++;
    if (maxrun > 5) begin failures++; $display("FAIL run length %0d", maxrun); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
