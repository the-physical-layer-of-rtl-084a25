// tb_tc_tx -- drives the TC transmitter from a model of the ATM layer and
// checks the character stream: every user cell appears in order with its
// header, reference HEC and payload in 4B1C; every other cell is an exact
// idle cell; a cell starts every 53 clocks; NCI comes 44 clocks after the
// first character of each cell is on the output (payload byte 40 selected);
// no more than MAX_BURST user cells follow one another, and the burst
// threshold forces idle cells. Both idle-cell causes (no cell ready, burst
// threshold) must occur.
module tb_tc_tx;
  import tb_ref_pkg::*;
  localparam int N = 40;
  localparam int BURST = 3;

  logic        clk = 0, rst_n = 0;
  logic        cell_avail, nci, h_rd, p_rd, tx_sof, tx_user, tx_forced_idle;
  logic [7:0]  h_data;
  logic [31:0] p_data;
  logic [9:0]  tx_char;
  int checks = 0, failures = 0;

  tc_tx #(.MAX_BURST(BURST)) dut (
    .clk, .rst_n, .cell_avail, .nci, .h_rd, .h_data, .p_rd, .p_data,
    .tx_char, .tx_sof, .tx_user, .tx_forced_idle);

  always #5 clk = ~clk;

  // ---- ATM layer model ----
  logic [31:0] hdr [N];
  logic [31:0] pay [N][12];
  int next_idx = 0, hcnt = 0, wcnt = 0;
  int committed [$];
  logic gate = 1;

  assign cell_avail = gate && (next_idx < N);
  assign h_data = (next_idx < N) ? hdr[next_idx][8*(3 - hcnt) +: 8] : 8'h00;
  assign p_data = (committed.size() > 0) ? pay[committed[0]][wcnt] : 32'h0;

  always @(posedge clk) if (rst_n) begin
    if (h_rd) begin
      if (hcnt == 3) begin committed.push_back(next_idx); next_idx++; hcnt = 0; end
      else hcnt++;
    end
    if (p_rd) begin
      if (wcnt == 11) begin void'(committed.pop_front()); wcnt = 0; end
      else wcnt++;
    end
  end

  // availability: stretches of no cell so that idle cells are needed
  always @(posedge clk) if (nci) gate <= ($urandom_range(3) != 0);

  // ---- checker ----
  int pos = -1, cyc = 0, last_sof = -1, exp_idx = 0, run = 0;
  int n_forced = 0, n_noavail_idle = 0, n_user = 0, n_idle = 0, n_nci = 0, n_hrd = 0, n_prd = 0;
  logic cell_user;
  logic [7:0] bytes [53];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (last_sof < 0 && !tx_sof) begin
      checks++;                      // nothing may look like an idle-cell start early
      if (tx_char == R_K285) begin failures++; $display("FAIL K28.5 before the first cell"); end
    end
    if (nci) begin
      n_nci++;
      checks++;
      if (cyc - last_sof != 44) begin failures++; $display("FAIL nci at %0d after sof", cyc - last_sof); end
      if (!cell_avail) n_noavail_idle++;
    end
    if (tx_forced_idle) n_forced++;
    if (h_rd) n_hrd++;
    if (p_rd) n_prd++;
    if (tx_sof) begin
      if (last_sof >= 0) begin
        checks++;
        if (cyc - last_sof != 53) begin failures++; $display("FAIL cell period %0d", cyc - last_sof); end
      end
      last_sof = cyc;
      pos = 0;
      cell_user = tx_user;
      if (tx_user) begin
        bytes[0] = hdr[exp_idx][31:24]; bytes[1] = hdr[exp_idx][23:16];
        bytes[2] = hdr[exp_idx][15:8];  bytes[3] = hdr[exp_idx][7:0];
        bytes[4] = ref_hec(hdr[exp_idx]);
        for (int w = 0; w < 12; w++)
          for (int b = 0; b < 4; b++) bytes[5 + 4*w + b] = pay[exp_idx][w][8*(3 - b) +: 8];
        exp_idx++; n_user++; run++;
        checks++;
        if (run > BURST) begin failures++; $display("FAIL burst of %0d user cells", run); end
      end else begin
        n_idle++; run = 0;
      end
    end
    if (pos >= 0) begin
      logic [9:0] e;
      e = cell_user ? ref_enc(bytes[pos]) : ref_idle(pos);
      checks++;
      if (tx_char !== e || tx_user !== cell_user) begin
        failures++;
        if (failures < 10) $display("FAIL pos %0d user %0b char %010b exp %010b", pos, cell_user, tx_char, e);
      end
      pos = (pos == 52) ? -1 : pos + 1;
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      hdr[i] = $urandom;
      for (int w = 0; w < 12; w++) pay[i][w] = $urandom;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (exp_idx == N);
    repeat (120) @(posedge clk);
    checks++; if (n_hrd != 4 * N) begin failures++; $display("FAIL %0d h_rd", n_hrd); end
    checks++; if (n_prd != 12 * N) begin failures++; $display("FAIL %0d p_rd", n_prd); end
    checks++; if (n_forced == 0) begin failures++; $display("FAIL no forced idle cell"); end
    checks++; if (n_noavail_idle == 0) begin failures++; $display("FAIL no idle cell for lack of a cell"); end
    $display("user cells %0d idle cells %0d forced idle %0d no-cell idle %0d", n_user, n_idle, n_forced, n_noavail_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
