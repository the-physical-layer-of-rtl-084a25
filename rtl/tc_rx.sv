// tc_rx -- receiver of the transmission convergence (TC) sublayer.
//
// Takes one 10-bit character per clock from the Fibre Channel receiver,
// together with its K28.5 indication, and delivers user cells to the ATM
// layer: the four header bytes on the 8-bit H-bus and the payload on the
// 32-bit P-bus.
//
// Working (document): cell_sync finds the cell boundary from idle cells.
// In SYNC the first four characters are 4B1C-decoded into the Head Buffer;
// a K28.5 on the first one marks an idle cell, which is removed. At position
// 4 the HEC byte arrives and hec_check validates the header: no error - the
// cell is passed on; one error - its byte number and bit position are
// registered, and while the header is handed over an XOR plane driven by
// them flips that bit (an error in the HEC byte itself needs no correction);
// more errors - the cell is discarded. Each HEC result feeds cell_sync's
// loss-of-delineation count. Payload bytes fill the Payload Buffer (a 4-byte
// word register) and leave as 32-bit words.
//
// Timing: the first payload word (positions 5-8) appears on p_data with
// p_valid and p_sof in the clock after position 8; the four corrected header
// bytes appear on h_data with h_valid in that clock and the three after it,
// i.e. alongside the first four payload bytes. Further words follow every
// fourth clock. The single character clock, the word register as payload
// buffer and the event outputs are this design's choices.
module tc_rx
  import bic_phy_pkg::*;
#(
  parameter int unsigned M_LOSS = 7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  char_t       rx_char,
  input  logic        rx_k285,
  // ATM layer side
  output logic        h_valid,
  output logic [7:0]  h_data,
  output logic        p_valid,
  output logic [31:0] p_data,
  output logic        p_sof,
  // status
  output sync_state_t state,
  output logic        ev_idle,
  output logic        ev_hec_err,
  output logic        ev_corr,
  output logic        ev_drop,
  output logic        sync_lost
);
  pos_t        pos;
  logic [7:0]  dbyte;
  logic        viol;
  logic [7:0]  hb_q [HDR_INFO];       // Head Buffer
  logic        idle_q, keep_q;
  logic        corr_q;                // header needs correction
  logic [1:0]  ebyte_q;               // byte number of the error
  logic [2:0]  ebit_q;                // bit position of the error
  logic [23:0] wq;                    // Payload Buffer (partial word)

  logic        in_sync, at_hec, hdr_done;
  logic [7:0]  syndrome;
  logic        err, correctable;
  logic [1:0]  err_byte;
  logic [2:0]  err_bit;
  logic [31:0] mask;
  logic [5:0]  pb;
  logic [1:0]  hsel;

  dec_4b1c u_dec (.code(rx_char), .data(dbyte), .viol(viol));

  hec_check u_hec (
    .hdr        ({hb_q[0], hb_q[1], hb_q[2], hb_q[3]}),
    .hec        (dbyte),
    .syndrome   (syndrome),
    .err        (err),
    .correctable(correctable),
    .err_byte   (err_byte),
    .err_bit    (err_bit),
    .mask       (mask)
  );

  always_comb begin
    in_sync  = (state == SYNC);
    at_hec   = in_sync && (pos == pos_t'(HDR_INFO));
    hdr_done = at_hec && !idle_q;
    pb       = 6'(pos - pos_t'(HDR_BYTES));
    hsel     = 2'(pos - pos_t'(HDR_BYTES + 3));
  end

  cell_sync #(.M_LOSS(M_LOSS)) u_sync (
    .clk, .rst_n,
    .k285     (rx_k285),
    .code     (rx_char),
    .hdr_done (hdr_done),
    .hdr_err  (err),
    .state    (state),
    .pos      (pos),
    .sync_lost(sync_lost)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < HDR_INFO; i++) hb_q[i] <= '0;
      idle_q     <= 1'b0;
      keep_q     <= 1'b0;
      corr_q     <= 1'b0;
      ebyte_q    <= '0;
      ebit_q     <= '0;
      wq         <= '0;
      h_valid    <= 1'b0;
      h_data     <= '0;
      p_valid    <= 1'b0;
      p_data     <= '0;
      p_sof      <= 1'b0;
      ev_idle    <= 1'b0;
      ev_hec_err <= 1'b0;
      ev_corr    <= 1'b0;
      ev_drop    <= 1'b0;
    end else begin
      h_valid    <= 1'b0;
      p_valid    <= 1'b0;
      p_sof      <= 1'b0;
      ev_idle    <= 1'b0;
      ev_hec_err <= 1'b0;
      ev_corr    <= 1'b0;
      ev_drop    <= 1'b0;
      if (in_sync) begin
        if (pos < pos_t'(HDR_INFO)) hb_q[pos[1:0]] <= dbyte;
        if (pos == '0) begin
          idle_q <= rx_k285;
          keep_q <= 1'b0;
        end
        if (at_hec) begin
          keep_q     <= !idle_q && (!err || correctable) && !sync_lost;
          corr_q     <= err && (mask != '0);
          ebyte_q    <= err_byte;
          ebit_q     <= err_bit;
          ev_idle    <= idle_q;
          ev_hec_err <= !idle_q && err;
          ev_corr    <= !idle_q && err && correctable;
          ev_drop    <= !idle_q && err && !correctable;
        end
        if (pos >= pos_t'(HDR_BYTES)) begin
          wq <= {wq[15:0], dbyte};
          if (pb[1:0] == 2'd3) begin
            p_valid <= keep_q;
            p_data  <= {wq, dbyte};
            p_sof   <= keep_q && (pb == 6'd3);
          end
        end
        // header to the ATM layer beside the first payload word, corrected
        if (keep_q && pos >= pos_t'(HDR_BYTES + 3) && pos < pos_t'(HDR_BYTES + 7)) begin
          h_valid <= 1'b1;
          h_data  <= hb_q[hsel] ^ ((corr_q && ebyte_q == hsel) ? (8'd1 << ebit_q) : 8'd0);
        end
      end
    end

  a_header_with_first_word: assert property (@(posedge clk) disable iff (!rst_n)
    p_sof |-> h_valid);
endmodule
