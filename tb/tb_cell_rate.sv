// tb_cell_rate -- throughput of the physical layer at its default
// parameters with an ATM layer that always has a cell ready, transmit
// characters looped back to the receiver without errors. Checks that a cell
// leaves every 53 clocks (1.887 Mcells/s with the 100 MHz character clock,
// 10 ns period here), that exactly one idle cell follows every MAX_BURST = 32
// user cells, and that every user cell arrives, so user throughput is 32/33
// of the cell rate.
module tb_cell_rate;
  import tb_ref_pkg::*;
  localparam int N = 330;

  logic        clk = 0, rst_n = 0;
  logic        atm_nci, atm_h_rd, atm_p_rd;
  logic [7:0]  atm_h_out;
  logic [31:0] atm_p_out;
  logic        atm_h_valid, atm_p_valid, atm_p_sof;
  logic [9:0]  fca_tx_char, fca_rx_char = 0;
  logic        fca_rx_k285 = 0;
  logic        tx_sof, tx_user, tx_forced_idle;
  logic [1:0]  rx_state;
  logic        rx_ev_idle, rx_ev_hec_err, rx_ev_corr, rx_ev_drop, rx_sync_lost;
  int checks = 0, failures = 0;
  int hcnt = 0, n_cells = 0, n_user = 0, run = 0, n_rx = 0, last_sof = -1, cyc = 0;
  int t_first = 0, t_last = 0;

  bic_phy_top dut (
    .tx_clk(clk), .rx_clk(clk), .rst_n,
    .atm_cell_avail(1'b1), .atm_nci, .atm_h_rd, .atm_h_data(8'(hcnt * 17)), .atm_p_rd,
    .atm_p_data(32'hC0DE0000 + 32'(n_user)),
    .atm_h_valid, .atm_h_out, .atm_p_valid, .atm_p_out, .atm_p_sof,
    .fca_tx_char, .fca_rx_char, .fca_rx_k285,
    .tx_sof, .tx_user, .tx_forced_idle, .rx_state,
    .rx_ev_idle, .rx_ev_hec_err, .rx_ev_corr, .rx_ev_drop, .rx_sync_lost);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    fca_rx_char <= fca_tx_char;
    fca_rx_k285 <= (fca_tx_char == R_K285);
    if (atm_h_rd) hcnt = (hcnt + 1) % 4;
    if (atm_p_sof) n_rx++;
    if (tx_sof) begin
      if (last_sof >= 0) begin
        checks++;
        if (cyc - last_sof != 53) begin failures++; $display("FAIL period %0d", cyc - last_sof); end
      end
      last_sof = cyc;
      if (n_cells == 0) t_first = $time;
      n_cells++;
      t_last = $time;
      if (tx_user) begin
        n_user++; run++;
      end else if (n_user > 0) begin
        checks++;
        if (run != 32) begin failures++; $display("FAIL idle after %0d user cells", run); end
        run = 0;
      end
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mcells;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (n_cells == N);
    repeat (120) @(posedge clk);
    mcells = 1.0e3 * real'(n_cells - 1) / real'(t_last - t_first);  // time unit 1 ns
    checks++;
    if (mcells < 1.88 || mcells > 1.89) begin failures++; $display("FAIL rate %f", mcells); end
    checks++;
    if (n_rx != n_user) begin failures++; $display("FAIL %0d sent %0d received", n_user, n_rx); end
    $display("cells %0d user %0d received %0d rate %.4f Mcells/s user share %.4f", n_cells, n_user, n_rx,
             mcells, real'(n_user) / real'(n_cells));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
