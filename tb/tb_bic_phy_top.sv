// tb_bic_phy_top -- end-to-end test of the physical layer at its default
// parameters. The transmit characters are looped back to the receive side
// through a channel model that stands in for the Fibre Channel adapter and
// fibre: it can flip line bits and it raises the K28.5 indication when it
// sees a K28.5 character. An ATM-layer model feeds numbered cells (cell
// number in the first payload word), sometimes with gaps and sometimes
// back to back for longer than the burst threshold.
// Checked: every delivered cell equals the cell sent with that number, in
// order, and with the same transmit-to-receive latency; cells given two
// header errors are never delivered; every clean or single-error cell sent
// while the receiver is synchronised is delivered. Counted, and required at
// least once: idle cell for lack of a cell, idle cell forced by the burst
// threshold, idle-cell removal, header correction, cell discard, loss of
// delineation and resynchronisation.
module tb_bic_phy_top;
  import tb_ref_pkg::*;
  localparam int N = 400;
  localparam int M = 7;

  logic        clk = 0, rst_n = 0;
  logic        atm_cell_avail, atm_nci, atm_h_rd, atm_p_rd;
  logic [7:0]  atm_h_data, atm_h_out;
  logic [31:0] atm_p_data, atm_p_out;
  logic        atm_h_valid, atm_p_valid, atm_p_sof;
  logic [9:0]  fca_tx_char, fca_rx_char;
  logic        fca_rx_k285;
  logic        tx_sof, tx_user, tx_forced_idle;
  logic [1:0]  rx_state;
  logic        rx_ev_idle, rx_ev_hec_err, rx_ev_corr, rx_ev_drop, rx_sync_lost;
  int checks = 0, failures = 0;

  bic_phy_top dut (
    .tx_clk(clk), .rx_clk(clk), .rst_n,
    .atm_cell_avail, .atm_nci, .atm_h_rd, .atm_h_data, .atm_p_rd, .atm_p_data,
    .atm_h_valid, .atm_h_out, .atm_p_valid, .atm_p_out, .atm_p_sof,
    .fca_tx_char, .fca_rx_char, .fca_rx_k285,
    .tx_sof, .tx_user, .tx_forced_idle, .rx_state,
    .rx_ev_idle, .rx_ev_hec_err, .rx_ev_corr, .rx_ev_drop, .rx_sync_lost);

  always #5 clk = ~clk;

  // ---- ATM layer, transmit side ----
  logic [31:0] hdr [N];
  logic [31:0] pay [N][12];
  int next_idx = 0, hcnt = 0, wcnt = 0, sent_cells = 0;
  int committed [$];
  logic gate = 0;
  int phase_cells = 0;

  assign atm_cell_avail = gate && (next_idx < N);
  assign atm_h_data = (next_idx < N) ? hdr[next_idx][8*(3 - hcnt) +: 8] : 8'h00;
  assign atm_p_data = (committed.size() > 0) ? pay[committed[0]][wcnt] : 32'h0;

  always @(posedge clk) if (rst_n) begin
    if (atm_h_rd) begin
      if (hcnt == 3) begin committed.push_back(next_idx); next_idx++; hcnt = 0; end
      else hcnt++;
    end
    if (atm_p_rd) begin
      if (wcnt == 11) begin void'(committed.pop_front()); wcnt = 0; end
      else wcnt++;
    end
  end

  // cells 0-119 and 240-299 back to back (burst threshold reached), else random gaps
  always @(posedge clk) if (atm_nci) gate <= (next_idx < 120) || (next_idx >= 240 && next_idx < 300) || ($urandom_range(4) != 0);

  // ---- channel: transmit characters to the receiver with line errors ----
  int  errmode [N];          // 0 clean, 1 one header error, 2 two header errors
  bit  must_arrive [N];
  int  tx_t0 [N];
  int  cyc = 0, pos = 0, cur = -1, flip_a = -1, flip_b = -1, tx_cells = 0;
  bit  lossy = 1, burst_done = 0, prev_idle = 0;
  int  burst_left = 0;
  logic [9:0] ch;

  function automatic int dbit();
    int r;
    r = $urandom_range(7);
    return (r < 4) ? r : r + 1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tx_sof) begin
      pos = 0; flip_a = -1; flip_b = -1; cur = -1;
      if (tx_user) begin
        cur = tx_cells++;
        tx_t0[cur] = cyc;
        if (burst_left > 0) begin
          errmode[cur] = 2; burst_left--;
        end else if (!burst_done && cur >= 250 && prev_idle) begin
          errmode[cur] = 2; burst_left = M - 1; burst_done = 1; lossy = 1;
        end else if (cur < 5) errmode[cur] = 0;
        else case ($urandom_range(9))
          0, 1: errmode[cur] = 1;
          2:    errmode[cur] = 2;
          default: errmode[cur] = 0;
        endcase
        if (errmode[cur] >= 1) flip_a = $urandom_range(4) * 10 + dbit();
        if (errmode[cur] == 2) flip_b = ((flip_a / 10 + 1 + $urandom_range(3)) % 5) * 10 + dbit();
        must_arrive[cur] = !lossy && errmode[cur] < 2;
      end else if (burst_left == 0) lossy = 0;   // a clean idle cell resynchronises
      prev_idle = !tx_user;
    end
    ch = fca_tx_char;
    if (pos == flip_a / 10 && flip_a >= 0) ch[flip_a % 10] = !ch[flip_a % 10];
    if (pos == flip_b / 10 && flip_b >= 0) ch[flip_b % 10] = !ch[flip_b % 10];
    fca_rx_char <= ch;
    fca_rx_k285 <= (ch == R_K285);
    pos++;
  end

  // ---- ATM layer, receive side ----
  int wi = 0, hb = 0, rx_id = -1, last_id = -1, lat0 = -1, delivered = 0;
  logic [31:0] got_hdr;
  logic [31:0] words [12];
  bit got [N];
  int n_nocell = 0, n_forced = 0, n_idle_rm = 0, n_corr = 0, n_drop = 0, n_lost = 0, n_resync = 0;
  logic [1:0] st_q = 0;

  always @(posedge clk) if (rst_n) begin
    if (atm_nci && !atm_cell_avail) n_nocell++;
    if (tx_forced_idle) n_forced++;
    if (rx_ev_idle) n_idle_rm++;
    if (rx_ev_corr) n_corr++;
    if (rx_ev_drop) n_drop++;
    if (rx_sync_lost) n_lost++;
    if (rx_state == 2'd2 && st_q != 2'd2) n_resync++;
    st_q <= rx_state;
    if (atm_h_valid) begin got_hdr = {got_hdr[23:0], atm_h_out}; hb++; end
    if (atm_p_valid) begin
      if (atm_p_sof) begin wi = 0; hb = atm_h_valid ? 1 : 0; end
      words[wi] = atm_p_out;
      wi++;
      if (wi == 12) begin
        int id;
        id = words[0];
        checks++;
        if (id < 0 || id >= N || id <= last_id) begin
          failures++; $display("FAIL cell id %0d after %0d", id, last_id);
        end else begin
          bit ok;
          ok = (got_hdr == hdr[id]) && errmode[id] < 2;
          for (int w = 0; w < 12; w++) if (words[w] != pay[id][w]) ok = 0;
          if (!ok) begin failures++; $display("FAIL cell %0d content (mode %0d)", id, errmode[id]); end
          if (lat0 < 0) lat0 = cyc - tx_t0[id];
          checks++;
          if (cyc - tx_t0[id] != lat0) begin failures++; $display("FAIL latency %0d vs %0d", cyc - tx_t0[id], lat0); end
          got[id] = 1; last_id = id; delivered++;
        end
      end
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    int missing;
    for (int i = 0; i < N; i++) begin
      hdr[i] = $urandom;
      pay[i][0] = i;
      for (int w = 1; w < 12; w++) pay[i][w] = $urandom;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (tx_cells == N);
    repeat (200) @(posedge clk);
    missing = 0;
    for (int i = 0; i < N; i++) if (must_arrive[i] && !got[i]) missing++;
    checks++; if (missing) begin failures++; $display("FAIL %0d cells not delivered", missing); end
    need(n_nocell, "idle cell, no cell ready");
    need(n_forced, "idle cell forced by burst threshold");
    need(n_idle_rm, "idle cell removed");
    need(n_corr, "header corrected");
    need(n_drop, "cell discarded");
    need(n_lost, "delineation lost");
    need(n_resync >= 2, "resynchronised");
    $display("cells sent %0d delivered %0d | no-cell idle %0d forced idle %0d idle removed %0d corrected %0d dropped %0d lost %0d sync entries %0d latency %0d",
             N, delivered, n_nocell, n_forced, n_idle_rm, n_corr, n_drop, n_lost, n_resync, lat0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
