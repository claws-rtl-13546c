// phy_config: run-time parameter registers of the CLAWS PHY and MAC.
//
// Holds every parameter that can be changed without rebuilding the logic:
// the standard and extended transmitter and receiver parameters (origin of
// data, FCS on/off and polynomial, SFD, maximum length, chipping sequences,
// modulation type, pulse shape, TX gain, shifter frequencies, CCA
// threshold, RX destination) and the lower-MAC switches. Both the host and
// the embedded CPU may write them; the register map (claws_pkg REG_*) and
// the rule that the host write wins when both write in the same cycle are
// this design's own choices. A write takes effect on the next clock edge.
// Reset values give a standard 802.15.4 radio.
module phy_config
  import claws_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        host_we,
  input  logic [7:0]  host_addr,
  input  logic [31:0] host_wdata,
  input  logic        cpu_we,
  input  logic [7:0]  cpu_addr,
  input  logic [31:0] cpu_wdata,
  output phy_cfg_t    cfg,
  output chip_tab_t   chip_tab
);

  logic        we;
  logic [7:0]  addr;
  logic [31:0] wdata;
  logic [31:0] ctrl;

  always_comb begin
    we    = host_we | cpu_we;
    addr  = host_we ? host_addr  : cpu_addr;
    wdata = host_we ? host_wdata : cpu_wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl            <= CTRL_RESET;
      cfg.tx_crc_poly <= CRC_POLY_ITU;
      cfg.tx_sfd      <= SFD_STD;
      cfg.tx_max_len  <= MAX_LEN_STD;
      cfg.tx_gain     <= 8'd128;
      cfg.tx_fcw      <= '0;
      cfg.rx_fcw      <= '0;
      cfg.cca_thresh  <= 32'd1000;
      cfg.rx_crc_poly <= CRC_POLY_ITU;
      cfg.rx_sfd      <= SFD_STD;
      cfg.rx_max_len  <= MAX_LEN_STD;
      cfg.ack_delay   <= '0;
      chip_tab        <= std_chip_tab();
    end else if (we) begin
      case (addr)
        REG_CTRL:        ctrl            <= wdata;
        REG_TX_CRC_POLY: cfg.tx_crc_poly <= wdata[15:0];
        REG_TX_SFD:      cfg.tx_sfd      <= wdata[7:0];
        REG_TX_MAX_LEN:  cfg.tx_max_len  <= wdata[6:0];
        REG_TX_GAIN:     cfg.tx_gain     <= wdata[7:0];
        REG_TX_FCW:      cfg.tx_fcw      <= wdata;
        REG_RX_FCW:      cfg.rx_fcw      <= wdata;
        REG_CCA_THRESH:  cfg.cca_thresh  <= wdata;
        REG_RX_CRC_POLY: cfg.rx_crc_poly <= wdata[15:0];
        REG_RX_SFD:      cfg.rx_sfd      <= wdata[7:0];
        REG_RX_MAX_LEN:  cfg.rx_max_len  <= wdata[6:0];
        REG_ACK_DELAY:   cfg.ack_delay   <= wdata[15:0];
        default:
          if (addr[7:4] == REG_CHIP_BASE[7:4]) chip_tab[addr[3:0]] <= wdata;
      endcase
    end
  end

  always_comb begin
    cfg.tx_src      = ctrl[CTRL_TX_SRC];
    cfg.tx_crc_en   = ctrl[CTRL_TX_CRC];
    cfg.offset_en   = ctrl[CTRL_OFFSET];
    cfg.shape_sel   = ctrl[CTRL_SHAPE];
    cfg.rx_dst      = {ctrl[CTRL_RX_DST_M], ctrl[CTRL_RX_DST_H]};
    cfg.rx_crc_en   = ctrl[CTRL_RX_CRC];
    cfg.cca_en      = ctrl[CTRL_CCA_EN];
    cfg.full_duplex = ctrl[CTRL_FULL_DUP];
    cfg.auto_ack    = ctrl[CTRL_AUTO_ACK];
    cfg.fcs_filter  = ctrl[CTRL_FCS_FILTER];
    cfg.rx_en       = ctrl[CTRL_RX_EN];
  end

endmodule
