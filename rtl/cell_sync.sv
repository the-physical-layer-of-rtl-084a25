// cell_sync -- cell delineation state machine of the TC receiver.
//
// HUNT: counts consecutive K28.5 indications from the Fibre Channel receiver
// (which has already aligned characters on K28.5). The fourth in a row marks
// the first four characters of an idle cell, so the cell boundary is known
// and the machine enters PRESYNC at position 4.
// PRESYNC: checks the rest of that idle cell character by character against
// the idle pattern (CK28.5 in the HEC slot, then twelve K28.5 CK CK CK
// blocks). Any mismatch returns to HUNT; a complete match enters SYNC.
// SYNC: keeps the 53-character cell count. The receiver reports each user
// cell's HEC result (hdr_done/hdr_err at position 4); M_LOSS consecutive
// errored cells return to HUNT, so a new idle cell is needed to resynchronise.
// A cell without HEC error, or an idle cell (K28.5 indication on its first
// character), clears the count.
// HUNT/PRESYNC/SYNC, the four K28.5 and the idle-payload check follow the
// document; the value of M_LOSS (the document's m) and the handling of a
// PRESYNC mismatch are this design's choices.
// 'pos' is the position of the character on 'code' in the current clock;
// state changes take effect in the next clock.
module cell_sync
  import bic_phy_pkg::*;
#(
  parameter int unsigned M_LOSS = 7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        k285,
  input  char_t       code,
  input  logic        hdr_done,
  input  logic        hdr_err,
  output sync_state_t state,
  output pos_t        pos,
  output logic        sync_lost
);
  sync_state_t state_q;
  pos_t        pos_q;
  logic [2:0]  kcnt_q;
  logic [7:0]  ecnt_q;
  logic        match, lose;

  always_comb begin
    match     = (code == idle_char(pos_q));
    lose      = (state_q == SYNC) && hdr_done && hdr_err && (ecnt_q == 8'(M_LOSS - 1));
    state     = state_q;
    pos       = pos_q;
    sync_lost = lose;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state_q <= HUNT;
      pos_q   <= '0;
      kcnt_q  <= '0;
      ecnt_q  <= '0;
    end else begin
      unique case (state_q)
        HUNT: begin
          pos_q <= '0;
          if (!k285)                             kcnt_q <= '0;
          else if (kcnt_q == 3'(HUNT_K - 1)) begin
            kcnt_q  <= '0;
            state_q <= PRESYNC;
            pos_q   <= pos_t'(HUNT_K);
          end else                               kcnt_q <= kcnt_q + 1'b1;
        end
        PRESYNC: begin
          if (!match) begin
            state_q <= HUNT;
            kcnt_q  <= k285 ? 3'd1 : 3'd0;
            pos_q   <= '0;
          end else if (pos_q == pos_t'(CELL_BYTES - 1)) begin
            state_q <= SYNC;
            pos_q   <= '0;
            ecnt_q  <= '0;
          end else pos_q <= pos_q + 1'b1;
        end
        SYNC: begin
          pos_q <= (pos_q == pos_t'(CELL_BYTES - 1)) ? '0 : pos_q + 1'b1;
          if (hdr_done) ecnt_q <= hdr_err ? ecnt_q + 8'd1 : 8'd0;
          if (pos_q == '0 && k285) ecnt_q <= '0;          // idle cell
          if (lose) begin
            state_q <= HUNT;
            kcnt_q  <= '0;
            ecnt_q  <= '0;
          end
        end
        default: state_q <= HUNT;
      endcase
    end

  a_done_at_hec: assert property (@(posedge clk) disable iff (!rst_n)
    hdr_done |-> pos_q == pos_t'(HDR_INFO));
endmodule
