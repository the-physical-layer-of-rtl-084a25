// tb_hec_gen -- feeds headers byte by byte into the HEC generator and
// compares with a long-division CRC-8 reference, including the B-ISDN
// test vector 00 00 00 01 -> HEC 52, back-to-back headers and gaps between
// byte strobes.
module tb_hec_gen;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [7:0] data = 0, hec;
  int checks = 0, failures = 0;

  hec_gen dut (.clk, .rst_n, .clr, .en, .data, .hec);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [31:0] h, input int gap);
    for (int b = 3; b >= 0; b--) begin
      @(negedge clk);
      en = 1; clr = (b == 3); data = h[8*b +: 8];
      @(negedge clk);
      en = 0; clr = 0;
      repeat (gap) @(negedge clk);
    end
    checks++;
    if (hec !== ref_hec(h)) begin
      failures++; $display("FAIL hdr %08x hec %02x exp %02x", h, hec, ref_hec(h));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(32'h00000001, 0);
    checks++; if (hec !== 8'h52) begin failures++; $display("FAIL vector"); end
    send(32'h00000000, 1);
    checks++; if (hec !== 8'h55) failures++;
    for (int n = 0; n < 500; n++) send($urandom, n % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
