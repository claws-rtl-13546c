// claws_pkg: types, constants and helper functions shared by the CLAWS
// 802.15.4 node.
//
// The node is an IEEE 802.15.4 (2.4 GHz O-QPSK) baseband with a run-time
// configurable transmitter and receiver, a lower-MAC engine and a digital
// frequency shifter on each path. Everything that the host or the embedded
// CPU may tune without rebuilding the logic is gathered in phy_cfg_t and is
// written through the register map defined below (the map itself is this
// design's own choice). Reset values give a standard-compliant radio: SFD
// 0xA7, FCS on with the ITU-T CRC-16, 127-byte maximum PSDU and the standard
// chipping sequences.
package claws_pkg;

  // Register addresses of phy_config (word registers, 32 bits)
  localparam logic [7:0] REG_CTRL        = 8'h00; // see CTRL_* bit positions
  localparam logic [7:0] REG_TX_CRC_POLY = 8'h01; // reflected CRC polynomial
  localparam logic [7:0] REG_TX_SFD      = 8'h02;
  localparam logic [7:0] REG_TX_MAX_LEN  = 8'h03;
  localparam logic [7:0] REG_TX_GAIN     = 8'h04; // 128 = unity
  localparam logic [7:0] REG_TX_FCW      = 8'h05; // TX shift, f/fs * 2^32
  localparam logic [7:0] REG_RX_FCW      = 8'h06; // RX shift, f/fs * 2^32
  localparam logic [7:0] REG_CCA_THRESH  = 8'h07;
  localparam logic [7:0] REG_RX_CRC_POLY = 8'h08;
  localparam logic [7:0] REG_RX_SFD      = 8'h09;
  localparam logic [7:0] REG_RX_MAX_LEN  = 8'h0A;
  localparam logic [7:0] REG_ACK_DELAY   = 8'h0B; // cycles before an ACK
  localparam logic [7:0] REG_CHIP_BASE   = 8'h40; // 0x40..0x4F chip table

  // REG_CTRL bit positions
  localparam int CTRL_TX_SRC     = 0;  // 0 host FIFO, 1 MAC processor
  localparam int CTRL_TX_CRC     = 1;  // append FCS on transmit
  localparam int CTRL_OFFSET     = 2;  // 1 O-QPSK, 0 QPSK without offset
  localparam int CTRL_SHAPE      = 3;  // 0 half-sine, 1 rectangular
  localparam int CTRL_RX_DST_H   = 4;  // deliver received packets to host
  localparam int CTRL_RX_DST_M   = 5;  // deliver received packets to MAC
  localparam int CTRL_RX_CRC     = 6;  // verify FCS on receive
  localparam int CTRL_CCA_EN     = 7;  // MAC: CSMA/CA before data frames
  localparam int CTRL_FULL_DUP   = 8;  // MAC: receive while transmitting
  localparam int CTRL_AUTO_ACK   = 9;  // MAC: answer ACK requests
  localparam int CTRL_FCS_FILTER = 10; // MAC: only report frames with good FCS
  localparam int CTRL_RX_EN      = 11; // receiver enable

  localparam logic [31:0] CTRL_RESET = 32'h0000_0EF6; // TX_CRC, OFFSET,
  // RX_DST host+MAC, RX_CRC, CCA_EN, AUTO_ACK, FCS_FILTER, RX_EN

  localparam logic [15:0] CRC_POLY_ITU = 16'h8408; // x^16+x^12+x^5+1, reflected
  localparam logic [7:0]  SFD_STD      = 8'hA7;
  localparam logic [6:0]  MAX_LEN_STD  = 7'd127;

  typedef logic [31:0] chip_seq_t;           // bit j = chip c_j, c0 sent first
  typedef chip_seq_t   chip_tab_t [16];

  typedef struct packed {
    logic        tx_src;
    logic        tx_crc_en;
    logic [15:0] tx_crc_poly;
    logic [7:0]  tx_sfd;
    logic [6:0]  tx_max_len;
    logic        offset_en;
    logic        shape_sel;
    logic [7:0]  tx_gain;
    logic [31:0] tx_fcw;
    logic [31:0] rx_fcw;
    logic [31:0] cca_thresh;
    logic        rx_en;
    logic        rx_crc_en;
    logic [15:0] rx_crc_poly;
    logic [7:0]  rx_sfd;
    logic [6:0]  rx_max_len;
    logic [1:0]  rx_dst;        // bit0 host, bit1 MAC
    logic        cca_en;
    logic        full_duplex;
    logic        auto_ack;
    logic        fcs_filter;
    logic [15:0] ack_delay;
  } phy_cfg_t;

  // Standard 802.15.4 2.4 GHz chipping sequences. Symbol 0 is listed chip
  // c0 first; symbols 1..7 are symbol 0 delayed by 4*k chips; symbols 8..15
  // are symbols 0..7 with every odd-indexed chip inverted.
  localparam logic [0:31] SYM0_CHIPS = 32'b1101_1001_1100_0011_0101_0010_0010_1110;

  function automatic chip_tab_t std_chip_tab();
    chip_tab_t t;
    for (int s = 0; s < 16; s++)
      for (int j = 0; j < 32; j++)
        t[s][j] = SYM0_CHIPS[(j - 4 * (s % 8) + 32) % 32] ^ ((s >= 8) && (j % 2 == 1));
    return t;
  endfunction

  // One byte through the reflected CRC register, bit 0 first.
  function automatic logic [15:0] crc_byte(logic [15:0] crc, logic [7:0] b,
                                           logic [15:0] poly);
    logic [15:0] c;
    c = crc;
    for (int k = 0; k < 8; k++) begin
      if (c[0] ^ b[k]) c = (c >> 1) ^ poly;
      else             c = c >> 1;
    end
    return c;
  endfunction

  // MSK form of a chip sequence: bit m (1..31) is the rotation direction of
  // the half-sine O-QPSK signal while chip m starts, c[m]^c[m-1]^(m odd);
  // 1 means counter-clockwise. Bit 0 depends on the previous symbol and is 0.
  function automatic chip_seq_t msk_ref(chip_seq_t c);
    chip_seq_t r;
    r[0] = 1'b0;
    for (int m = 1; m < 32; m++) r[m] = c[m] ^ c[m-1] ^ m[0];
    return r;
  endfunction

endpackage
