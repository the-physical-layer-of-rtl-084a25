// tb_tc_rx -- feeds the TC receiver a character stream built with the
// reference code: noise, idle cells, clean user cells, cells with one line
// error in the header or HEC (must arrive corrected), cells with two header
// errors (must be dropped), and a run of M errored cells (delineation lost;
// following cells are ignored until an idle cell resynchronises). Every
// delivered cell is compared with the expected one, and the first payload
// word must come 9 clocks after the cell's first character, with the four
// header bytes on the H-bus beside it.
module tb_tc_rx;
  import tb_ref_pkg::*;
  import bic_phy_pkg::SYNC;
  localparam int M = 7;

  logic        clk = 0, rst_n = 0, rx_k285 = 0;
  logic [9:0]  rx_char = 0;
  logic        h_valid, p_valid, p_sof, ev_idle, ev_hec_err, ev_corr, ev_drop, sync_lost;
  logic [7:0]  h_data;
  logic [31:0] p_data;
  bic_phy_pkg::sync_state_t state;
  int checks = 0, failures = 0;

  tc_rx #(.M_LOSS(M)) dut (.clk, .rst_n, .rx_char, .rx_k285, .h_valid, .h_data, .p_valid, .p_data,
    .p_sof, .state, .ev_idle, .ev_hec_err, .ev_corr, .ev_drop, .sync_lost);

  always #5 clk = ~clk;

  typedef struct { logic [31:0] hdr; logic [31:0] pay [12]; int t0; } cell_t;
  cell_t exp_q [$];
  int cyc = 0, n_corr = 0, n_drop = 0, n_idle = 0, n_lost = 0, n_got = 0, n_err = 0;


  // stream generator
  task automatic put(input logic [9:0] c);
    @(negedge clk);
    rx_char = c; rx_k285 = (c == R_K285);
  endtask

  task automatic idle_cell();
    for (int p = 0; p < 53; p++) put(ref_idle(p));
  endtask

  // flips: list of line-bit errors as (char position * 10 + code bit)
  task automatic user_cell(input int flip_a = -1, input int flip_b = -1, input bit expect_out = 1);
    cell_t c;
    logic [7:0] b [53];
    c.hdr = $urandom;
    for (int w = 0; w < 12; w++) c.pay[w] = $urandom;
    for (int i = 0; i < 4; i++) b[i] = c.hdr[8*(3 - i) +: 8];
    b[4] = ref_hec(c.hdr);
    for (int w = 0; w < 12; w++) for (int i = 0; i < 4; i++) b[5 + 4*w + i] = c.pay[w][8*(3 - i) +: 8];
    c.t0 = cyc + 2;               // char 0 is sampled at the second edge from now
    if (expect_out) exp_q.push_back(c);
    for (int p = 0; p < 53; p++) begin
      logic [9:0] ch;
      ch = ref_enc(b[p]);
      if (flip_a / 10 == p && flip_a >= 0) ch[flip_a % 10] = !ch[flip_a % 10];
      if (flip_b / 10 == p && flip_b >= 0) ch[flip_b % 10] = !ch[flip_b % 10];
      put(ch);
    end
  endtask

  // data (not complement) code bits: 0-3 and 5-8
  function automatic int dbit();
    int r;
    r = $urandom_range(7);
    return (r < 4) ? r : r + 1;
  endfunction

  // checker
  int hb = 0, wi = 0;
  logic [31:0] got_hdr;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ev_corr) n_corr++;
    if (ev_drop) n_drop++;
    if (ev_idle) n_idle++;
    if (ev_hec_err) n_err++;
    if (sync_lost) n_lost++;
    if (h_valid) begin
      got_hdr = {got_hdr[23:0], h_data};
      hb++;
      if (hb == 4) begin
        checks++;
        if (exp_q.size() == 0 || got_hdr !== exp_q[0].hdr) begin
          failures++; $display("FAIL header %08x", got_hdr);
        end
      end
    end
    if (p_valid) begin
      if (p_sof) begin
        wi = 0; hb = h_valid ? 1 : 0;
        checks++;
        if (!h_valid || exp_q.size() == 0 || cyc - exp_q[0].t0 != 9) begin
          failures++; $display("FAIL first word timing %0d", exp_q.size() ? cyc - exp_q[0].t0 : -1);
        end
      end
      checks++;
      if (exp_q.size() == 0 || p_data !== exp_q[0].pay[wi]) begin
        failures++; $display("FAIL payload word %0d %08x", wi, p_data);
      end
      wi++;
      if (wi == 12) begin void'(exp_q.pop_front()); n_got++; end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 37; i++) put(ref_enc(8'($urandom)));
    user_cell(-1, -1, 0);             // not delivered: no delineation yet
    idle_cell();
    for (int n = 0; n < 60; n++) begin
      int kind;
      kind = $urandom_range(5);
      case (kind)
        0: idle_cell();
        1: user_cell($urandom_range(4) * 10 + dbit());                  // one error
        2: begin                                                        // two errors
             int a, b;
             a = $urandom_range(3); b = a + 1 + $urandom_range(3 - a);
             user_cell(a * 10 + dbit(), b * 10 + dbit(), 0);
           end
        default: user_cell();
      endcase
    end
    idle_cell();
    // loss of delineation: M cells with two header errors
    for (int n = 0; n < M; n++) user_cell(10 + dbit(), 20 + dbit(), 0);
    checks++; if (n_lost != 1) begin failures++; $display("FAIL lost %0d", n_lost); end
    user_cell(-1, -1, 0);             // ignored while hunting
    idle_cell();
    for (int n = 0; n < 5; n++) user_cell();
    repeat (20) put(R_K285);
    repeat (10) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d cells missing", exp_q.size()); end
    checks++; if (n_corr == 0 || n_drop == 0 || n_idle == 0) begin failures++; $display("FAIL events"); end
    $display("delivered %0d corrected %0d dropped %0d idle %0d hec_err %0d", n_got, n_corr, n_drop, n_idle, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
