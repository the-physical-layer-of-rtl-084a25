// tb_idle_cell_gen -- compares the idle-cell generator with the literal idle
// cell: four K28.5, CK28.5, then twelve blocks K28.5 CK28.5 CK28.5 CK28.5;
// also counts that exactly 16 K28.5 appear in a cell and never four in a row
// after the start.
module tb_idle_cell_gen;
  import tb_ref_pkg::*;
  logic [5:0] pos;
  logic [9:0] code;
  int checks = 0, failures = 0;

  idle_cell_gen dut (.pos(pos), .code(code));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nk, run;
    nk = 0; run = 0;
    for (int p = 0; p < 53; p++) begin
      pos = 6'(p); #1;
      checks++;
      if (code !== ref_idle(p)) begin
        failures++; $display("FAIL pos %0d code %010b", p, code);
      end
      if (code == R_K285) begin nk++; run++; end else run = 0;
      if (p >= 4) begin checks++; if (run >= 4) failures++; end
    end
    checks++;
    if (nk != 16) begin failures++; $display("FAIL %0d K28.5 in cell", nk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
