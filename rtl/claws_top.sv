// claws_top: one CLAWS node - an IEEE 802.15.4 (2.4 GHz O-QPSK) software-
// defined radio baseband whose PHY and lower MAC are open for cross-layer
// experiments.
//
// Transmit path: the PSDU comes from the host TX FIFO or from the MAC
// processor (origin-of-data switch), is framed (preamble, SFD, PHR, FCS),
// spread to 32-chip sequences, O-QPSK modulated, half-sine shaped and
// shifted in frequency by the TX digital shifter before it leaves as
// 16-bit I/Q samples for the DAC. Receive path: samples from the ADC are
// shifted by the RX digital shifter, measured by the CCA block and MSK
// demodulated; the chips are correlated with the chipping sequences, the
// SFD is found, the packet is extracted and its FCS checked, and the PSDU
// goes to the host RX FIFO and/or the MAC processor, which stores it in the
// memory shared with the embedded CPU and answers ACK requests. All run-time
// parameters live in phy_config and can be written by the host or the CPU.
//
// The two shifters let the node receive on one channel and transmit on
// another at the same time (full duplex relay); with both shift words zero
// it is a standard single-channel node. One complex sample per clock; the
// default OSR of 8 samples per chip gives 16 Msample/s at the 802.15.4
// rate of 2 Mchip/s. The analog front end, the host command software and
// the CPU itself are outside: their signals are the ports.
//
// The chain of blocks and the run-time parameters of both paths follow
// the document's transmitter and receiver descriptions, as do the shared
// memory towards the CPU and the MAC tasks. The register map, the host
// FIFO word format, the fixed-function MAC (the document uses a small
// programmable processor), the demodulation algorithms and placing one
// shifter in each path are this design's own choices. The only receive
// filter is the demodulator's short moving average; there is no channel
// select filter or decimation.
module claws_top
  import claws_pkg::*;
#(
  parameter int OSR         = 8,
  parameter int UNIT_CYCLES = 5120,  // CSMA backoff unit: 20 symbols
  parameter int CCA_LOG2    = 11     // CCA block: 8 symbols
) (
  input  logic               clk,
  input  logic               rst_n,
  // analog front end
  output logic signed [15:0] tx_i,
  output logic signed [15:0] tx_q,
  input  logic signed [15:0] rx_i,
  input  logic signed [15:0] rx_q,
  // host: registers and packet FIFOs
  input  logic               host_we,
  input  logic [7:0]         host_addr,
  input  logic [31:0]        host_wdata,
  input  logic               host_tx_valid,
  output logic               host_tx_ready,
  input  logic [8:0]         host_tx_data,
  output logic               host_rx_valid,
  input  logic               host_rx_ready,
  output logic [8:0]         host_rx_data,
  // embedded CPU: registers, shared memory, MAC commands
  input  logic               cpu_we,
  input  logic [7:0]         cpu_addr,
  input  logic [31:0]        cpu_wdata,
  input  logic               cpu_mem_we,
  input  logic [7:0]         cpu_mem_addr,
  input  logic [7:0]         cpu_mem_wdata,
  output logic [7:0]         cpu_mem_rdata,
  input  logic               cpu_tx_req,
  input  logic [6:0]         cpu_tx_len,
  input  logic               cpu_rx_release,
  output logic               irq_rx,
  output logic               rx_avail,
  output logic [6:0]         rx_len,
  output logic               rx_fcs_ok,
  output logic               tx_done,
  output logic               tx_fail,
  output logic               ack_sent,
  // status
  output logic               sfd_irq,
  output logic               rx_done,
  output logic               rx_locked,     // receiver locked on a frame
  output logic               rx_len_err,
  output logic               tx_len_err,
  output logic               tx_busy,
  output logic [31:0]        rssi,
  output logic               cca_clear,
  output logic [15:0]        rx_overflow,
  output logic [15:0]        rx_dropped,
  output logic [15:0]        busy_cca
);
  localparam int PW = $clog2(2*OSR);

  phy_cfg_t  cfg;
  chip_tab_t chip_tab;

  phy_config u_cfg (
    .clk, .rst_n,
    .host_we, .host_addr, .host_wdata,
    .cpu_we, .cpu_addr, .cpu_wdata,
    .cfg, .chip_tab
  );

  // ---------------- transmit path ----------------
  logic       htx_valid, htx_ready;
  logic [8:0] htx_data;
  logic [8:0] htx_level;

  host_fifo #(.DEPTH(256), .WIDTH(9)) u_host_tx (
    .clk, .rst_n,
    .wr_valid(host_tx_valid), .wr_ready(host_tx_ready), .wr_data(host_tx_data),
    .rd_valid(htx_valid), .rd_ready(htx_ready), .rd_data(htx_data),
    .level(htx_level)
  );

  logic       mtx_start, mtx_valid, mtx_ready;
  logic [6:0] mtx_len;
  logic [7:0] mtx_data;
  logic       f_start, f_valid, f_ready, f_done;
  logic [6:0] f_len;
  logic [7:0] f_data;
  logic       fr_busy, sp_busy, md_busy;

  assign tx_busy = fr_busy | sp_busy | md_busy;

  tx_loader u_loader (
    .clk, .rst_n,
    .src_sel(cfg.tx_src), .tx_busy,
    .host_valid(htx_valid), .host_ready(htx_ready), .host_data(htx_data),
    .mac_start(mtx_start), .mac_len(mtx_len), .mac_valid(mtx_valid),
    .mac_ready(mtx_ready), .mac_data(mtx_data),
    .f_start, .f_len, .f_valid, .f_ready, .f_data, .f_done
  );

  logic [3:0] t_sym;
  logic       t_sym_valid, t_sym_ready;

  tx_framer u_framer (
    .clk, .rst_n,
    .start(f_start), .len(f_len),
    .crc_en(cfg.tx_crc_en), .crc_poly(cfg.tx_crc_poly), .sfd(cfg.tx_sfd),
    .max_len(cfg.tx_max_len),
    .byte_valid(f_valid), .byte_ready(f_ready), .byte_data(f_data),
    .sym(t_sym), .sym_valid(t_sym_valid), .sym_ready(t_sym_ready),
    .busy(fr_busy), .byte_done(f_done), .err_len(tx_len_err)
  );

  logic t_chip, t_chip_valid, t_chip_ready;

  chip_spreader u_spread (
    .clk, .rst_n, .chip_tab,
    .sym(t_sym), .sym_valid(t_sym_valid), .sym_ready(t_sym_ready),
    .chip(t_chip), .chip_valid(t_chip_valid), .chip_ready(t_chip_ready),
    .busy(sp_busy)
  );

  logic          i_act, i_bit, q_act, q_bit;
  logic [PW-1:0] i_ph, q_ph;

  oqpsk_mod #(.OSR(OSR)) u_mod (
    .clk, .rst_n, .offset_en(cfg.offset_en),
    .chip(t_chip), .chip_valid(t_chip_valid), .chip_ready(t_chip_ready),
    .i_act, .i_bit, .i_ph, .q_act, .q_bit, .q_ph, .busy(md_busy)
  );

  logic signed [15:0] bb_i, bb_q;

  pulse_shaper #(.OSR(OSR)) u_shape (
    .clk, .rst_n, .shape_sel(cfg.shape_sel), .gain(cfg.tx_gain),
    .i_act, .i_bit, .i_ph, .q_act, .q_bit, .q_ph,
    .i_out(bb_i), .q_out(bb_q)
  );

  digital_shifter u_tx_shift (
    .clk, .rst_n, .fcw(cfg.tx_fcw),
    .in_i(bb_i), .in_q(bb_q), .out_i(tx_i), .out_q(tx_q)
  );

  // ---------------- receive path ----------------
  logic signed [15:0] rb_i, rb_q;

  digital_shifter u_rx_shift (
    .clk, .rst_n, .fcw(cfg.rx_fcw),
    .in_i(rx_i), .in_q(rx_q), .out_i(rb_i), .out_q(rb_q)
  );

  logic cca_valid;

  cca #(.WIN_LOG2(CCA_LOG2)) u_cca (
    .clk, .rst_n, .in_i(rb_i), .in_q(rb_q), .thresh(cfg.cca_thresh),
    .rssi, .valid(cca_valid), .clear(cca_clear)
  );

  logic mac_rx_en, rx_on;
  logic r_chip, r_chip_valid;

  assign rx_on = cfg.rx_en && mac_rx_en;

  msk_demod #(.OSR(OSR)) u_demod (
    .clk, .rst_n, .en(rx_on), .in_i(rb_i), .in_q(rb_q),
    .chip(r_chip), .chip_valid(r_chip_valid)
  );

  logic [3:0] c_sym;
  logic [4:0] c_score;
  logic       c_valid;

  chip_correlator u_corr (
    .clk, .rst_n, .chip_tab, .chip(r_chip), .chip_valid(r_chip_valid),
    .sym(c_sym), .score(c_score), .valid(c_valid)
  );

  logic [3:0] p_sym;
  logic       p_valid, x_drop;

  sfd_detect u_sfd (
    .clk, .rst_n, .en(rx_on), .sfd(cfg.rx_sfd),
    .sym(c_sym), .score(c_score), .valid(c_valid), .drop(x_drop),
    .sfd_irq, .out_sym(p_sym), .out_valid(p_valid), .locked(rx_locked)
  );

  logic [7:0] x_data;
  logic       x_valid, x_first, x_last, x_fcs_ok, x_busy;
  logic [6:0] x_len;

  packet_extractor u_extract (
    .clk, .rst_n, .sof(sfd_irq), .sym(p_sym), .sym_valid(p_valid),
    .crc_en(cfg.rx_crc_en), .crc_poly(cfg.rx_crc_poly), .max_len(cfg.rx_max_len),
    .byte_data(x_data), .byte_valid(x_valid), .first(x_first), .last(x_last),
    .len(x_len), .done(rx_done), .fcs_ok(x_fcs_ok), .len_err(rx_len_err),
    .drop(x_drop), .busy(x_busy)
  );

  logic       hrx_valid, hrx_ready;
  logic [8:0] hrx_data;
  logic [7:0] m_data;
  logic       m_valid, m_first, m_last, m_done, m_fcs_ok;

  rx_writer u_writer (
    .clk, .rst_n, .dst(cfg.rx_dst),
    .byte_data(x_data), .byte_valid(x_valid), .first(x_first), .last(x_last),
    .done(rx_done), .fcs_ok(x_fcs_ok),
    .host_valid(hrx_valid), .host_ready(hrx_ready), .host_data(hrx_data),
    .overflow(rx_overflow),
    .mac_data(m_data), .mac_valid(m_valid), .mac_first(m_first), .mac_last(m_last),
    .mac_done(m_done), .mac_fcs_ok(m_fcs_ok)
  );

  logic [8:0] hrx_level;

  host_fifo #(.DEPTH(256), .WIDTH(9)) u_host_rx (
    .clk, .rst_n,
    .wr_valid(hrx_valid), .wr_ready(hrx_ready), .wr_data(hrx_data),
    .rd_valid(host_rx_valid), .rd_ready(host_rx_ready), .rd_data(host_rx_data),
    .level(hrx_level)
  );

  // ---------------- MAC processor and shared memory ----------------
  logic       mem_we;
  logic [7:0] mem_addr, mem_wdata, mem_rdata;

  mac_processor #(.UNIT_CYCLES(UNIT_CYCLES)) u_mac (
    .clk, .rst_n,
    .cca_en(cfg.cca_en), .full_duplex(cfg.full_duplex), .auto_ack(cfg.auto_ack),
    .fcs_filter(cfg.fcs_filter), .ack_delay(cfg.ack_delay),
    .cpu_tx_req, .cpu_tx_len, .cpu_rx_release,
    .rx_avail, .rx_len, .rx_fcs_ok, .irq_rx, .tx_done, .tx_fail, .ack_sent,
    .rx_dropped, .busy_cca,
    .phy_sfd(sfd_irq && cfg.rx_dst[1]), .phy_rx_busy(rx_locked),
    .phy_rx_data(m_data), .phy_rx_valid(m_valid), .phy_rx_done(m_done),
    .phy_rx_fcs_ok(m_fcs_ok), .rx_en(mac_rx_en),
    .cca_valid, .cca_clear,
    .phy_tx_start(mtx_start), .phy_tx_len(mtx_len), .phy_tx_data(mtx_data),
    .phy_tx_valid(mtx_valid), .phy_tx_ready(mtx_ready), .phy_tx_busy(tx_busy),
    .phy_tx_err(tx_len_err),
    .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  shared_mem #(.BYTES(256)) u_mem (
    .clk,
    .a_we(mem_we), .a_addr(mem_addr), .a_wdata(mem_wdata), .a_rdata(mem_rdata),
    .b_we(cpu_mem_we), .b_addr(cpu_mem_addr), .b_wdata(cpu_mem_wdata), .b_rdata(cpu_mem_rdata)
  );

endmodule
