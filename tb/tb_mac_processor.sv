`timescale 1ns/1ps
// tb_mac_processor: the MAC engine with a behavioural shared memory (one
// write/read port, registered read) and behavioural PHY models. The PHY
// receive model delivers octets with an SFD pulse and a done/FCS verdict
// on the last octet; the PHY transmit model takes a start, pulls octets
// with ready and stays busy for a while after the last. A CCA model gives
// a verdict every CCA_GAP clocks. UNIT_CYCLES is made small.
// Checks: receive buffer contents and status, automatic ACK contents and
// delay, ACK suppression (bad FCS, ACK frames, auto_ack off, buffer still
// held), dropped-frame count, CPU transmission with and without CSMA/CA,
// busy-channel retries and failure, half/full duplex and a refused length.
// Stimulus and sizes are this testbench's own; expected octets and timings are written out by hand from the 802.15.4 ACK format, not taken
// from the RTL.
module tb_mac_processor;
  localparam int UNIT = 20;
  localparam int CCA_GAP = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cca_en = 0, full_duplex = 0, auto_ack = 1, fcs_filter = 1;
  logic [15:0] ack_delay = 0;
  logic cpu_tx_req = 0, cpu_rx_release = 0;
  logic [6:0] cpu_tx_len = 0;
  logic rx_avail, rx_fcs_ok, irq_rx, tx_done, tx_fail, ack_sent;
  logic [6:0] rx_len;
  logic [15:0] rx_dropped, busy_cca;
  logic phy_sfd = 0, phy_rx_busy = 0, phy_rx_valid = 0, phy_rx_done = 0, phy_rx_fcs_ok = 0;
  logic [7:0] phy_rx_data = 0;
  logic rx_en;
  logic cca_valid = 0, cca_clear = 1;
  logic phy_tx_start, phy_tx_valid;
  logic [6:0] phy_tx_len;
  logic [7:0] phy_tx_data;
  logic phy_tx_ready = 0, phy_tx_busy = 0, phy_tx_err = 0;
  logic mem_we;
  logic [7:0] mem_addr, mem_wdata, mem_rdata;

  mac_processor #(.UNIT_CYCLES(UNIT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // ---- shared memory model
  logic [7:0] mem [256];
  always @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    mem_rdata <= mem[mem_addr];
  end

  // ---- event counters
  int cyc = 0, n_irq = 0, n_done = 0, n_fail = 0, n_ack = 0, n_start = 0, t_start = 0;
  bit rx_en_low_in_tx = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (irq_rx) n_irq++;
    if (tx_done) n_done++;
    if (tx_fail) n_fail++;
    if (ack_sent) n_ack++;
    if (phy_tx_start) begin n_start++; t_start = cyc; end
  end

  // ---- PHY transmit model
  bit force_err = 0;
  int tx_len_seen = 0;
  logic [7:0] txq[$];
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && phy_tx_start) begin
        int n;
        tx_len_seen = phy_tx_len;
        txq.delete();
        @(negedge clk); phy_tx_busy = 1;
        if (force_err) begin
          repeat (3) @(negedge clk);
          phy_tx_err = 1; phy_tx_busy = 0;
          @(negedge clk); phy_tx_err = 0;
        end else begin
          n = tx_len_seen - 2;
          for (int k = 0; k < n; k++) begin
            repeat (5) @(negedge clk);
            phy_tx_ready = 1;
            do begin
              @(posedge clk);
              if (phy_tx_valid) txq.push_back(phy_tx_data);
              if (!rx_en) rx_en_low_in_tx = 1;
            end while (!phy_tx_valid);
            @(negedge clk); phy_tx_ready = 0;
          end
          repeat (30) @(negedge clk);
          phy_tx_busy = 0;
        end
      end
    end
  end

  // ---- CCA model
  initial forever begin
    repeat (CCA_GAP - 1) @(negedge clk);
    cca_valid = 1; @(negedge clk); cca_valid = 0;
  end

  // ---- PHY receive model
  task automatic rx_frame(input logic [7:0] b[$], input bit ok);
    @(negedge clk); phy_sfd = 1; phy_rx_busy = 1;
    @(negedge clk); phy_sfd = 0;
    foreach (b[k]) begin
      repeat (9) @(negedge clk);
      phy_rx_data = b[k]; phy_rx_valid = 1;
      if (k == b.size() - 1) begin phy_rx_done = 1; phy_rx_fcs_ok = ok; end
      @(negedge clk); phy_rx_valid = 0; phy_rx_done = 0;
    end
    repeat (3) @(negedge clk); phy_rx_busy = 0;
  endtask

  task automatic wait_idle(input int n = 2000);
    repeat (n) @(negedge clk);
  endtask

  task automatic release_rx();
    @(negedge clk); cpu_rx_release = 1; @(negedge clk); cpu_rx_release = 0;
  endtask

  task automatic tx_req(input int len);
    @(negedge clk); cpu_tx_req = 1; cpu_tx_len = 7'(len); @(negedge clk); cpu_tx_req = 0;
  endtask

  logic [7:0] f[$];
  int i0, a0, s0, d0, c0, tq, done_cyc;

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (5) @(negedge clk);

    // 1. data frame asking for an ACK
    f = '{8'h21, 8'h88, 8'h5A, 8'h34, 8'h12, 8'hFF, 8'hFF, 8'h01, 8'h02, 8'h03, 8'hAB, 8'hCD};
    rx_frame(f, 1);
    done_cyc = cyc;
    check(n_irq == 1 && rx_avail && rx_len == 12 && rx_fcs_ok, "frame reported to the CPU");
    begin bit ok; ok = 1; foreach (f[k]) if (mem[k] != f[k]) ok = 0; check(ok, "frame in the receive buffer"); end
    wait_idle();
    check(n_start == 1 && tx_len_seen == 5, "ACK started with PSDU length 5");
    check(t_start - done_cyc <= 4, $sformatf("ACK started %0d clocks after the frame", t_start - done_cyc));
    check(txq.size() == 3 && txq[0] == 8'h02 && txq[1] == 8'h00 && txq[2] == 8'h5A, "ACK octets 02 00 seq");
    check(n_ack == 1 && n_done == 0, "ack_sent, no tx_done");
    check(rx_en_low_in_tx, "receiver off during the ACK (half duplex)");

    // 2. frame while the buffer is still held: dropped, no ACK
    a0 = n_start;
    rx_frame('{8'h21, 8'h88, 8'h5B, 8'h00, 8'h00}, 1);
    wait_idle();
    check(rx_dropped == 1 && n_irq == 1 && n_start == a0, "frame dropped while buffer held");
    check(mem[2] == 8'h5A, "held buffer not overwritten");
    release_rx();
    check(!rx_avail, "buffer released");

    // 3. bad FCS with filter: nothing; without filter: reported but no ACK
    rx_frame('{8'h21, 8'h88, 8'h5C, 8'h00, 8'h00}, 0);
    wait_idle(500);
    check(n_irq == 1 && n_start == a0, "bad FCS filtered, no ACK");
    fcs_filter = 0;
    rx_frame('{8'h21, 8'h88, 8'h5D, 8'h00, 8'h00}, 0);
    wait_idle(500);
    check(n_irq == 2 && !rx_fcs_ok && n_start == a0, "bad FCS reported when not filtered, no ACK");
    release_rx(); fcs_filter = 1;

    // 4. an ACK frame and auto_ack off: no ACK
    rx_frame('{8'h22, 8'h00, 8'h5E, 8'h00, 8'h00}, 1);
    wait_idle(500); release_rx();
    auto_ack = 0;
    rx_frame('{8'h21, 8'h88, 8'h5F, 8'h00, 8'h00}, 1);
    wait_idle(500); release_rx();
    check(n_irq == 4 && n_start == a0, "no ACK for ACK frames or with auto_ack off");
    auto_ack = 1;

    // 5. ACK delay
    ack_delay = 100;
    rx_frame('{8'h61, 8'h88, 8'h60, 8'h00, 8'h00}, 1);
    done_cyc = cyc - 4;
    wait_idle();
    check(n_start == a0 + 1 && t_start - done_cyc >= 100 && t_start - done_cyc <= 106,
          $sformatf("ACK after the set delay (%0d clocks)", t_start - done_cyc));
    release_rx(); ack_delay = 0;

    // 6. CPU frame without CCA
    for (int k = 0; k < 18; k++) mem[128 + k] = 8'(k * 7 + 3);
    s0 = n_start; d0 = n_done;
    tx_req(20);
    repeat (4) @(negedge clk);
    check(n_start == s0 + 1 && t_start - cyc >= -4, "CPU frame started at once without CCA");
    wait_idle();
    begin bit ok; ok = txq.size() == 18; for (int k = 0; k < 18 && k < txq.size(); k++) if (txq[k] != 8'(k * 7 + 3)) ok = 0;
      check(ok && tx_len_seen == 20, "CPU frame octets and length"); end
    check(n_done == d0 + 1, "tx_done");

    // 7. CSMA/CA: two busy assessments, then clear
    cca_en = 1; cca_clear = 0;
    s0 = n_start; c0 = busy_cca;
    tx_req(20);
    while (busy_cca < c0 + 2) @(negedge clk);
    cca_clear = 1;
    wait_idle(4000);
    check(busy_cca == c0 + 2 && n_start == s0 + 1 && n_done == d0 + 2, "sent after two busy assessments");

    // 8. channel always busy: failure after four assessments
    cca_clear = 0; s0 = n_start; c0 = busy_cca;
    tx_req(20);
    wait_idle(20000);
    check(busy_cca == c0 + 4 && n_fail == 1 && n_start == s0, "tx_fail after four busy assessments");
    cca_clear = 1; cca_en = 0;

    // 9. half duplex waits for the receiver; full duplex does not
    s0 = n_start;
    fork
      rx_frame('{8'h01, 8'h88, 8'h61, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00}, 1);
      begin repeat (10) @(negedge clk); tx_req(20); end
    join
    tq = cyc;
    repeat (10) @(negedge clk);
    check(n_start == s0 + 1 && t_start >= tq, "half duplex: started after the receiver was free");
    wait_idle(); release_rx();
    full_duplex = 1; rx_en_low_in_tx = 0; s0 = n_start;
    fork
      rx_frame('{8'h01, 8'h88, 8'h62, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00}, 1);
      begin repeat (10) @(negedge clk); tx_req(20); repeat (5) @(negedge clk);
            check(n_start == s0 + 1, "full duplex: started while receiving"); end
    join
    wait_idle(); release_rx();
    check(!rx_en_low_in_tx && n_irq == 7, "full duplex: receiver stays on");
    full_duplex = 0;

    // 10. framer refuses the length
    force_err = 1; d0 = n_done;
    tx_req(1);
    wait_idle(200);
    check(n_fail == 2 && n_done == d0, "refused length gives tx_fail");
    force_err = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
