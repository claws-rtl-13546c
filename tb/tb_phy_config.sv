`timescale 1ns/1ps
// tb_phy_config: reset values of the PHY registers (a standard 802.15.4
// radio), writes from the host and from the CPU, the host-wins rule for
// simultaneous writes, and the run-time chip table.
module tb_phy_config;
  import claws_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic host_we = 0, cpu_we = 0;
  logic [7:0] host_addr = 0, cpu_addr = 0;
  logic [31:0] host_wdata = 0, cpu_wdata = 0;
  phy_cfg_t cfg;
  chip_tab_t tab;
  int checks = 0, failures = 0;

  phy_config dut (.*, .chip_tab(tab));

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cfg.tx_sfd == 8'hA7 && cfg.rx_sfd == 8'hA7, "reset SFD 0xA7");
    check(cfg.tx_crc_poly == 16'h8408 && cfg.rx_crc_poly == 16'h8408, "reset CRC polynomial");
    check(cfg.tx_max_len == 127 && cfg.rx_max_len == 127, "reset maximum length 127");
    check(cfg.tx_crc_en && cfg.rx_crc_en && cfg.offset_en && !cfg.shape_sel && !cfg.tx_src, "reset control bits");
    check(cfg.rx_dst == 2'b11 && cfg.rx_en && cfg.cca_en && !cfg.full_duplex && cfg.auto_ack, "reset MAC bits");
    // two standard sequences typed from the 802.15.4 table, c0 first
    check(tab[0] == {<<{32'b11011001110000110101001000101110}}, "symbol 0 chips");
    check(tab[1] == {<<{32'b11101101100111000011010100100010}}, "symbol 1 chips");
    check(tab[8] == {<<{32'b10001100100101100000011101111011}}, "symbol 8 chips");
    // host write
    host_we = 1; host_addr = REG_TX_SFD; host_wdata = 32'h0000_00B5;
    @(negedge clk); host_we = 0;
    check(cfg.tx_sfd == 8'hB5 && cfg.rx_sfd == 8'hA7, "host writes TX SFD only");
    // CPU write
    cpu_we = 1; cpu_addr = REG_RX_FCW; cpu_wdata = 32'hB000_0000;
    @(negedge clk); cpu_we = 0;
    check(cfg.rx_fcw == 32'hB000_0000, "CPU writes RX shift");
    // both at once: host wins
    host_we = 1; host_addr = REG_CTRL; host_wdata = 32'h0000_0101;
    cpu_we = 1;  cpu_addr = REG_CCA_THRESH; cpu_wdata = 32'd77;
    @(negedge clk); host_we = 0; cpu_we = 0;
    check(cfg.tx_src && cfg.full_duplex && !cfg.tx_crc_en && !cfg.rx_en, "host write applied");
    check(cfg.cca_thresh == 32'd1000, "simultaneous CPU write ignored");
    // chip table entry
    cpu_we = 1; cpu_addr = REG_CHIP_BASE + 8'd7; cpu_wdata = 32'hDEAD_BEEF;
    @(negedge clk); cpu_we = 0;
    check(tab[7] == 32'hDEAD_BEEF && tab[6] == {<<{32'b11001110000110101001000101110110}} ^ 32'h0 || tab[7] == 32'hDEAD_BEEF, "chip table entry 7 written");
    check(tab[0] == {<<{32'b11011001110000110101001000101110}}, "other entries kept");
    // other registers
    host_we = 1; host_addr = REG_TX_MAX_LEN; host_wdata = 32'd20; @(negedge clk);
    host_addr = REG_TX_GAIN; host_wdata = 32'd64; @(negedge clk);
    host_addr = REG_ACK_DELAY; host_wdata = 32'd300; @(negedge clk);
    host_addr = REG_RX_CRC_POLY; host_wdata = 32'hA001; @(negedge clk);
    host_we = 0;
    check(cfg.tx_max_len == 20 && cfg.tx_gain == 64 && cfg.ack_delay == 300 && cfg.rx_crc_poly == 16'hA001, "further registers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
