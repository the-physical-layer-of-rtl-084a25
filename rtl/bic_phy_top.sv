// bic_phy_top -- physical layer of a BIC-LAN ring station (the TC sublayer
// of both directions).
//
// The transmit path (tc_tx) takes cells from the ATM layer over the H-bus
// (header bytes) and P-bus (32-bit payload words), adds the HEC, 4B1C-codes
// them and fills the gaps with idle cells; its 10-bit characters go to the
// Fibre Channel adapter. The receive path (tc_rx) takes 10-bit characters
// and the K28.5 indication from the adapter, delineates cells from idle
// cells, corrects single header errors, drops idle and uncorrectable cells
// and hands user cells to the ATM layer.
//
// The Fibre Channel adapter (level translators, TAXI transmitter and
// receiver with clock recovery, optical modules and their controller) is
// made of commercial parts and stays outside: its 10-bit buses are ports.
// Each direction runs on its own character clock (tx_clk: local 100 MHz,
// rx_clk: recovered from the line); rst_n is shared and asynchronous.
module bic_phy_top
  import bic_phy_pkg::*;
#(
  parameter int unsigned NCI_BYTE  = 40,
  parameter int unsigned H_CLKS    = 2,
  parameter int unsigned MAX_BURST = 32,
  parameter int unsigned M_LOSS    = 7
) (
  input  logic        tx_clk,
  input  logic        rx_clk,
  input  logic        rst_n,
  // ATM layer, transmit direction
  input  logic        atm_cell_avail,
  output logic        atm_nci,
  output logic        atm_h_rd,
  input  logic [7:0]  atm_h_data,
  output logic        atm_p_rd,
  input  logic [31:0] atm_p_data,
  // ATM layer, receive direction
  output logic        atm_h_valid,
  output logic [7:0]  atm_h_out,
  output logic        atm_p_valid,
  output logic [31:0] atm_p_out,
  output logic        atm_p_sof,
  // Fibre Channel adapter
  output logic [9:0]  fca_tx_char,
  input  logic [9:0]  fca_rx_char,
  input  logic        fca_rx_k285,
  // status towards station management
  output logic        tx_sof,
  output logic        tx_user,
  output logic        tx_forced_idle,
  output logic [1:0]  rx_state,
  output logic        rx_ev_idle,
  output logic        rx_ev_hec_err,
  output logic        rx_ev_corr,
  output logic        rx_ev_drop,
  output logic        rx_sync_lost
);
  sync_state_t st;

  tc_tx #(.NCI_BYTE(NCI_BYTE), .H_CLKS(H_CLKS), .MAX_BURST(MAX_BURST)) u_tx (
    .clk           (tx_clk),
    .rst_n,
    .cell_avail    (atm_cell_avail),
    .nci           (atm_nci),
    .h_rd          (atm_h_rd),
    .h_data        (atm_h_data),
    .p_rd          (atm_p_rd),
    .p_data        (atm_p_data),
    .tx_char       (fca_tx_char),
    .tx_sof,
    .tx_user,
    .tx_forced_idle
  );

  tc_rx #(.M_LOSS(M_LOSS)) u_rx (
    .clk       (rx_clk),
    .rst_n,
    .rx_char   (fca_rx_char),
    .rx_k285   (fca_rx_k285),
    .h_valid   (atm_h_valid),
    .h_data    (atm_h_out),
    .p_valid   (atm_p_valid),
    .p_data    (atm_p_out),
    .p_sof     (atm_p_sof),
    .state     (st),
    .ev_idle   (rx_ev_idle),
    .ev_hec_err(rx_ev_hec_err),
    .ev_corr   (rx_ev_corr),
    .ev_drop   (rx_ev_drop),
    .sync_lost (rx_sync_lost)
  );

  assign rx_state = st;
endmodule
