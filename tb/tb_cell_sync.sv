// tb_cell_sync -- cell delineation: random user characters keep HUNT; four
// K28.5 enter PRESYNC; a full idle cell enters SYNC with the position counter
// on the next cell boundary; a damaged idle payload returns to HUNT;
// in SYNC, M-1 errored cells followed by a clean one keep SYNC, while M
// consecutive errored cells return to HUNT with one sync_lost pulse.
module tb_cell_sync;
  import tb_ref_pkg::*;
  import bic_phy_pkg::sync_state_t;
  import bic_phy_pkg::HUNT;
  import bic_phy_pkg::PRESYNC;
  import bic_phy_pkg::SYNC;
  localparam int M = 7;

  logic        clk = 0, rst_n = 0, k285 = 0, hdr_done = 0, hdr_err = 0, sync_lost;
  logic [9:0]  code = 0;
  sync_state_t state;
  logic [5:0]  pos;
  int checks = 0, failures = 0, n_lost = 0;

  cell_sync #(.M_LOSS(M)) dut (.clk, .rst_n, .k285, .code, .hdr_done, .hdr_err, .state, .pos, .sync_lost);

  always #5 clk = ~clk;
  always @(posedge clk) if (sync_lost) n_lost++;

  task automatic put(input logic [9:0] c, input logic done = 0, input logic err = 0);
    @(negedge clk);
    code = c; k285 = (c == R_K285); hdr_done = done; hdr_err = err;
  endtask

  task automatic chk(input sync_state_t s, input string what);
    @(posedge clk); #1;
    checks++;
    if (state !== s) begin failures++; $display("FAIL %s: state %s", what, state.name()); end
  endtask

  task automatic idle_cell(input int bad_at = -1);
    for (int p = 0; p < 53; p++) put((p == bad_at) ? ref_enc(8'h5a) : ref_idle(p));
  endtask

  task automatic user_cell(input logic err);
    for (int p = 0; p < 53; p++) begin
      put(ref_enc(8'($urandom)), p == 4, err);
      if (p == 0) begin
        @(posedge clk); checks++;
        if (pos !== 0) begin failures++; $display("FAIL pos %0d at cell start", pos); end
      end
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) put(ref_enc(8'($urandom)));
    chk(HUNT, "garbage");
    // three K28.5 then data: stays in HUNT
    put(R_K285); put(R_K285); put(R_K285); put(ref_enc(8'h00));
    chk(HUNT, "three K");
    // idle cell damaged in its payload
    for (int p = 0; p < 4; p++) put(R_K285);
    chk(PRESYNC, "four K");
    for (int p = 4; p < 20; p++) put(ref_idle(p));
    chk(PRESYNC, "presync payload");
    put(R_K285);                      // a K28.5 where a CK28.5 belongs
    chk(HUNT, "damaged idle");
    put(R_CK285); put(ref_enc(8'h3c));
    // good idle cell
    idle_cell();
    chk(SYNC, "idle cell");
    // M-1 errors then a clean cell, then M errors
    for (int i = 0; i < M - 1; i++) user_cell(1);
    user_cell(0);
    chk(SYNC, "m-1 errors");
    checks++; if (n_lost != 0) failures++;
    for (int i = 0; i < M - 1; i++) user_cell(1);
    chk(SYNC, "m-1 errors again");
    for (int p = 0; p < 5; p++) put(ref_enc(8'h11), p == 4, 1'b1);
    chk(HUNT, "m errors");
    checks++; if (n_lost != 1) begin failures++; $display("FAIL sync_lost count %0d", n_lost); end
    for (int p = 5; p < 53; p++) put(ref_enc(8'h22));
    // idle cell in SYNC resets the error count
    idle_cell(); chk(SYNC, "resync");
    for (int i = 0; i < M - 1; i++) user_cell(1);
    idle_cell();
    user_cell(1);
    chk(SYNC, "idle clears count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
