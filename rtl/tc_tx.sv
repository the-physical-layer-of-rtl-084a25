// tc_tx -- transmitter of the transmission convergence (TC) sublayer.
//
// Turns the ATM layer's cells into a continuous stream of 10-bit characters
// for the Fibre Channel transmitter, one character per clock (100 MHz, i.e.
// 100 Mbyte/s and 1.887 Mcells/s of 53-character cells). A cell is either a
// user cell (4 header bytes, HEC, 48 payload bytes, all 4B1C coded) or an
// idle cell from the idle-cell generator; there are no unassigned cells.
//
// Scheduling (document): in the clock in which payload byte NCI_BYTE (40)
// of the cell being sent is on tx_char, i.e. just after it was transmitted,
// 'nci' pulses and 'cell_avail' is sampled. If a cell is available the next cell is a user cell and its four
// header bytes are fetched over the H-bus (h_rd/h_data, one byte every
// H_CLKS clocks) while the rest of the payload goes out; the HEC is
// accumulated as they arrive, so the header is complete when the payload
// ends. Otherwise, or when MAX_BURST user cells have followed the last idle
// cell (the cell-rate decoupling threshold), the next cell is an idle cell.
// The payload of a user cell is read over the 32-bit P-bus (p_rd/p_data) one
// word every fourth clock, bits [31:24] sent first; each word is read one
// clock before its first byte is due. As in the document, user bytes are
// 4B1C-coded in four parallel byte-lane paths (payload) and as they arrive
// (header), and the coded characters meet the idle-cell generator in the
// final multiplexer; the mux is read here as three stages (byte lane,
// header/payload, user/idle).
//
// This design's choices: one character clock instead of the prototype's
// 25 MHz multi-stage FPGA paths; the H_CLKS and MAX_BURST values; data on
// h_data/p_data valid in the clock of the strobe; idle cells after reset
// (tx_char shows CK28.5 during reset so that the first idle cell starts with
// exactly four K28.5).
// Output registers: tx_char/tx_sof/tx_user show the character selected in
// the previous clock.
module tc_tx
  import bic_phy_pkg::*;
#(
  parameter int unsigned NCI_BYTE  = 40,
  parameter int unsigned H_CLKS    = 2,
  parameter int unsigned MAX_BURST = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // ATM layer side
  input  logic        cell_avail,
  output logic        nci,
  output logic        h_rd,
  input  logic [7:0]  h_data,
  output logic        p_rd,
  input  logic [31:0] p_data,
  // Fibre Channel adapter side
  output char_t       tx_char,
  output logic        tx_sof,
  output logic        tx_user,
  output logic        tx_forced_idle
);
  localparam int unsigned NCI_POS = HDR_BYTES + NCI_BYTE;

  if (NCI_POS + 3 * H_CLKS > CELL_BYTES - 1 || NCI_BYTE > PAYLOAD_BYTES || H_CLKS == 0
      || MAX_BURST == 0 || MAX_BURST > 255) begin : g_bad_cfg
    $error("tc_tx: header fetch does not fit before the end of the cell, or MAX_BURST out of range");
  end

  pos_t        pos_q;
  logic        cur_user_q, nxt_user_q;
  logic [7:0]  burst_q;
  logic [7:0]  hec;

  // ---- next-cell decision and header fetch ----
  logic        at_nci, go, take, in_fetch;
  logic [5:0]  k;
  logic [1:0]  hidx;

  always_comb begin
    at_nci   = (pos_q == pos_t'(NCI_POS));
    go       = at_nci && cell_avail && (burst_q < 8'(MAX_BURST));
    take     = at_nci ? go : nxt_user_q;
    in_fetch = (pos_q >= pos_t'(NCI_POS));
    k        = 6'(pos_q - pos_t'(NCI_POS));
    hidx     = 2'(k / 6'(H_CLKS));
    h_rd     = take && in_fetch && (k % 6'(H_CLKS) == 0) && (k / 6'(H_CLKS) < 6'(HDR_INFO));
    nci      = at_nci;
  end

  hec_gen u_hec (
    .clk, .rst_n,
    .clr  (h_rd && hidx == 2'd0),
    .en   (h_rd),
    .data (h_data),
    .hec  (hec)
  );

  // ---- payload path: four parallel 4B1C coders, one per P-bus byte lane ----
  // The word is read one clock before its first byte is due and stored
  // already coded.
  char_t      lane_code [4];
  char_t      pword_q   [4];
  logic [5:0] pb;

  for (genvar l = 0; l < 4; l++) begin : g_lane
    enc_4b1c u_enc (.data(p_data[8*(3 - l) +: 8]), .code(lane_code[l]));
  end

  always_comb begin
    pb   = 6'(pos_q - pos_t'(HDR_BYTES));
    p_rd = cur_user_q && (pos_q >= pos_t'(HDR_INFO)) && (pos_q < pos_t'(CELL_BYTES - 4))
           && (pb[1:0] == 2'd3);
  end

  // ---- header path: bytes coded as they arrive, HEC coded when complete ----
  char_t hbyte_code, hec_code;
  char_t hdr_code_q [HDR_INFO];

  enc_4b1c u_enc_h   (.data(h_data), .code(hbyte_code));
  enc_4b1c u_enc_hec (.data(hec),    .code(hec_code));

  // ---- three multiplexing stages: byte lane, header/payload, user/idle ----
  char_t lane_sel, user_code, icode, nxt_char;

  idle_cell_gen u_idle (.pos(pos_q), .code(icode));

  always_comb begin
    lane_sel = pword_q[pb[1:0]];
    if (pos_q < pos_t'(HDR_INFO))       user_code = hdr_code_q[pos_q[1:0]];
    else if (pos_q == pos_t'(HDR_INFO)) user_code = hec_code;
    else                                user_code = lane_sel;
    nxt_char = cur_user_q ? user_code : icode;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pos_q          <= '0;
      cur_user_q     <= 1'b0;
      nxt_user_q     <= 1'b0;
      burst_q        <= '0;
      tx_char        <= CK285;          // never a K28.5 ahead of the first idle cell
      tx_sof         <= 1'b0;
      tx_user        <= 1'b0;
      tx_forced_idle <= 1'b0;
      for (int i = 0; i < HDR_INFO; i++) hdr_code_q[i] <= '0;
      for (int i = 0; i < 4; i++)        pword_q[i]    <= '0;
    end else begin
      tx_char        <= nxt_char;
      tx_sof         <= (pos_q == '0);
      tx_user        <= cur_user_q;
      tx_forced_idle <= at_nci && cell_avail && !go;
      if (at_nci) nxt_user_q <= go;
      if (h_rd)   hdr_code_q[hidx] <= hbyte_code;
      if (p_rd)   pword_q <= lane_code;
      if (pos_q == pos_t'(CELL_BYTES - 1)) begin
        pos_q      <= '0;
        cur_user_q <= nxt_user_q;
        burst_q    <= nxt_user_q ? burst_q + 8'd1 : 8'd0;
      end else begin
        pos_q <= pos_q + 1'b1;
      end
    end

  // the H-bus fetch never overlaps the header characters it refills
  a_fetch_window: assert property (@(posedge clk) disable iff (!rst_n)
    h_rd |-> pos_q >= pos_t'(NCI_POS));
endmodule
