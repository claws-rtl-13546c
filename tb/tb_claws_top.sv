// tb_claws_top: end-to-end test of two CLAWS nodes talking to each other.
//
// Node A's transmit samples feed node B's receiver and the other way round
// (a cross-connected channel, with an optional constant carrier offset and
// optional white Gaussian noise on the A-to-B direction). The test goes through the
// mechanisms of the design and counts each one:
//   host path      host FIFO in A -> air -> host FIFO of B, payload compared
//   MAC + ACK      CPU frame from A's shared memory with ACK request; B
//                  stores it, answers with an ACK; A receives the ACK
//   CSMA/CA        A senses the channel before sending, and finds it busy
//                  while B transmits (busy assessments counted)
//   FCS error      A uses another CRC polynomial; B flags the FCS and its
//                  MAC does not report the frame
//   length errors  TX refuses a length above its maximum, RX refuses one
//                  above its own maximum
//   digital shift  A transmits 5 MHz above, B receives 5 MHz below the
//                  centre; the mean phase step of A's output is measured;
//                  a second frame uses +-2.5 MHz, since a receive shift
//                  wrong by 5 MHz still lets a clean frame through
//   carrier offset 100 kHz between A and B, removed by B's demodulator
//   duplex modes   B transmits to A while A transmits: received by A only
//                  in full duplex
//   chip table     a non-standard spreading code on both sides works, on
//                  one side only it does not
//   noise          four frames through noise of 3 dB SNR per sample (about
//                  12 dB in the signal band) all arrive with a good FCS
// All expected values are computed here from the payload the test sends.
// The nodes run with every parameter at its default value.
`timescale 1ns/1ps
module tb_claws_top;
  import claws_pkg::*;

  localparam int OSR = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_host_rx = 0, n_ack = 0, n_busy_cca = 0, n_fcs_bad = 0, n_tx_len_err = 0,
      n_rx_len_err = 0, n_shift = 0, n_fd = 0, n_hd_block = 0, n_chiptab = 0,
      n_cfo = 0, n_csma_ok = 0, n_noise = 0;
  chip_tab_t std_tab;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- two nodes ----------------
  typedef struct {
    logic        host_we;
    logic [7:0]  host_addr;
    logic [31:0] host_wdata;
    logic        host_tx_valid;
    logic [8:0]  host_tx_data;
    logic        host_rx_ready;
    logic        cpu_we;
    logic [7:0]  cpu_addr;
    logic [31:0] cpu_wdata;
    logic        cpu_mem_we;
    logic [7:0]  cpu_mem_addr;
    logic [7:0]  cpu_mem_wdata;
    logic        cpu_tx_req;
    logic [6:0]  cpu_tx_len;
    logic        cpu_rx_release;
  } drv_t;

  drv_t da, db;
  logic signed [15:0] a_tx_i, a_tx_q, b_tx_i, b_tx_q, a_rx_i, a_rx_q, b_rx_i, b_rx_q;
  logic a_host_tx_ready, b_host_tx_ready, a_host_rx_valid, b_host_rx_valid;
  logic [8:0] a_host_rx_data, b_host_rx_data;
  logic [7:0] a_mem_rdata, b_mem_rdata;
  logic a_irq, b_irq, a_avail, b_avail, a_fcs, b_fcs, a_txd, b_txd, a_txf, b_txf, a_acks, b_acks;
  logic [6:0] a_rlen, b_rlen;
  logic a_sfd, b_sfd, a_rdone, b_rdone, a_rlerr, b_rlerr, a_tlerr, b_tlerr, a_busy, b_busy;
  logic a_locked, b_locked;
  logic [31:0] a_rssi, b_rssi;
  logic a_clear, b_clear;
  logic [15:0] a_ovf, b_ovf, a_drop, b_drop, a_bcca, b_bcca;

  claws_top u_a (
    .clk, .rst_n, .tx_i(a_tx_i), .tx_q(a_tx_q), .rx_i(a_rx_i), .rx_q(a_rx_q),
    .host_we(da.host_we), .host_addr(da.host_addr), .host_wdata(da.host_wdata),
    .host_tx_valid(da.host_tx_valid), .host_tx_ready(a_host_tx_ready), .host_tx_data(da.host_tx_data),
    .host_rx_valid(a_host_rx_valid), .host_rx_ready(da.host_rx_ready), .host_rx_data(a_host_rx_data),
    .cpu_we(da.cpu_we), .cpu_addr(da.cpu_addr), .cpu_wdata(da.cpu_wdata),
    .cpu_mem_we(da.cpu_mem_we), .cpu_mem_addr(da.cpu_mem_addr), .cpu_mem_wdata(da.cpu_mem_wdata),
    .cpu_mem_rdata(a_mem_rdata), .cpu_tx_req(da.cpu_tx_req), .cpu_tx_len(da.cpu_tx_len),
    .cpu_rx_release(da.cpu_rx_release), .irq_rx(a_irq), .rx_avail(a_avail), .rx_len(a_rlen),
    .rx_fcs_ok(a_fcs), .tx_done(a_txd), .tx_fail(a_txf), .ack_sent(a_acks),
    .sfd_irq(a_sfd), .rx_done(a_rdone), .rx_locked(a_locked), .rx_len_err(a_rlerr), .tx_len_err(a_tlerr),
    .tx_busy(a_busy), .rssi(a_rssi), .cca_clear(a_clear), .rx_overflow(a_ovf),
    .rx_dropped(a_drop), .busy_cca(a_bcca)
  );

  claws_top u_b (
    .clk, .rst_n, .tx_i(b_tx_i), .tx_q(b_tx_q), .rx_i(b_rx_i), .rx_q(b_rx_q),
    .host_we(db.host_we), .host_addr(db.host_addr), .host_wdata(db.host_wdata),
    .host_tx_valid(db.host_tx_valid), .host_tx_ready(b_host_tx_ready), .host_tx_data(db.host_tx_data),
    .host_rx_valid(b_host_rx_valid), .host_rx_ready(db.host_rx_ready), .host_rx_data(b_host_rx_data),
    .cpu_we(db.cpu_we), .cpu_addr(db.cpu_addr), .cpu_wdata(db.cpu_wdata),
    .cpu_mem_we(db.cpu_mem_we), .cpu_mem_addr(db.cpu_mem_addr), .cpu_mem_wdata(db.cpu_mem_wdata),
    .cpu_mem_rdata(b_mem_rdata), .cpu_tx_req(db.cpu_tx_req), .cpu_tx_len(db.cpu_tx_len),
    .cpu_rx_release(db.cpu_rx_release), .irq_rx(b_irq), .rx_avail(b_avail), .rx_len(b_rlen),
    .rx_fcs_ok(b_fcs), .tx_done(b_txd), .tx_fail(b_txf), .ack_sent(b_acks),
    .sfd_irq(b_sfd), .rx_done(b_rdone), .rx_locked(b_locked), .rx_len_err(b_rlerr), .tx_len_err(b_tlerr),
    .tx_busy(b_busy), .rssi(b_rssi), .cca_clear(b_clear), .rx_overflow(b_ovf),
    .rx_dropped(b_drop), .busy_cca(b_bcca)
  );

  // ---------------- channel ----------------
  // Optional carrier offset on A->B: rotate by a slowly turning phase.
  real cfo_step = 0.0;   // radians per sample
  real cfo_ph   = 0.0;
  always @(posedge clk) cfo_ph <= cfo_ph + cfo_step;
  // Optional white Gaussian noise on A->B (sum of 12 uniforms), clipped to
  // the 16-bit range.
  real noise_sd = 0.0;
  real nz_i = 0.0, nz_q = 0.0;
  function automatic real gauss();
    real g = 0.0;
    for (int k = 0; k < 12; k++) g += real'($urandom_range(0, 999999)) / 1000000.0;
    return g - 6.0;
  endfunction
  function automatic logic signed [15:0] clip16(input real v);
    if (v > 32767.0) return 16'sd32767;
    if (v < -32768.0) return -16'sd32768;
    return 16'($rtoi(v));
  endfunction
  always @(posedge clk) begin
    nz_i <= (noise_sd > 0.0) ? noise_sd * gauss() : 0.0;
    nz_q <= (noise_sd > 0.0) ? noise_sd * gauss() : 0.0;
  end
  always_comb begin
    b_rx_i = clip16(real'(a_tx_i) * $cos(cfo_ph) - real'(a_tx_q) * $sin(cfo_ph) + nz_i);
    b_rx_q = clip16(real'(a_tx_i) * $sin(cfo_ph) + real'(a_tx_q) * $cos(cfo_ph) + nz_q);
    a_rx_i = b_tx_i;
    a_rx_q = b_tx_q;
  end

  // mean phase step of A's transmitted samples while measuring (shift check)
  bit  meas_on = 0;
  real ang_sum = 0.0;
  int  ang_n = 0;
  real prev_ang = 0.0;
  always @(posedge clk) if (meas_on && (a_tx_i != 0 || a_tx_q != 0)) begin
    real a, dlt;
    a   = $atan2(real'(a_tx_q), real'(a_tx_i));
    dlt = a - prev_ang;
    while (dlt >  3.14159265358979) dlt -= 2.0 * 3.14159265358979;
    while (dlt < -3.14159265358979) dlt += 2.0 * 3.14159265358979;
    if (ang_n > 0 || prev_ang != 0.0) begin ang_sum += dlt; ang_n++; end
    prev_ang = a;
  end

  // ---------------- event counters ----------------
  int a_sfd_n = 0, b_sfd_n = 0, a_irq_n = 0, b_irq_n = 0, b_acks_n = 0, a_txd_n = 0,
      a_txf_n = 0, b_txd_n = 0, a_tlerr_n = 0, b_rlerr_n = 0;
  always @(posedge clk) if (rst_n) begin
    if (a_sfd) a_sfd_n++;
    if (b_sfd) b_sfd_n++;
    if (a_irq) a_irq_n++;
    if (b_irq) b_irq_n++;
    if (b_acks) b_acks_n++;
    if (a_txd) a_txd_n++;
    if (a_txf) a_txf_n++;
    if (b_txd) b_txd_n++;
    if (a_tlerr) a_tlerr_n++;
    if (b_rlerr) b_rlerr_n++;
  end

  // host RX FIFO of B (and A) collected into queues
  logic [8:0] b_hq[$], a_hq[$];
  always @(posedge clk) if (rst_n) begin
    if (b_host_rx_valid && db.host_rx_ready) b_hq.push_back(b_host_rx_data);
    if (a_host_rx_valid && da.host_rx_ready) a_hq.push_back(a_host_rx_data);
  end

  // ---------------- helpers ----------------
  task automatic wreg(input bit node_b, input logic [7:0] addr, input logic [31:0] data);
    @(negedge clk);
    if (node_b) begin db.host_we = 1; db.host_addr = addr; db.host_wdata = data; end
    else        begin da.host_we = 1; da.host_addr = addr; da.host_wdata = data; end
    @(negedge clk);
    da.host_we = 0; db.host_we = 0;
  endtask

  task automatic host_send(input bit node_b, input logic [7:0] p[], input int len);
    // len = PSDU length including FCS; p holds len-2 payload bytes
    @(negedge clk);
    for (int k = -1; k < p.size(); k++) begin
      if (node_b) begin db.host_tx_valid = 1; db.host_tx_data = (k < 0) ? 9'(len) : {1'b0, p[k]}; end
      else        begin da.host_tx_valid = 1; da.host_tx_data = (k < 0) ? 9'(len) : {1'b0, p[k]}; end
      @(negedge clk);
    end
    da.host_tx_valid = 0; db.host_tx_valid = 0;
  endtask

  task automatic cpu_write_frame(input bit node_b, input logic [7:0] p[]);
    for (int k = 0; k < p.size(); k++) begin
      @(negedge clk);
      if (node_b) begin db.cpu_mem_we = 1; db.cpu_mem_addr = 8'h80 + 8'(k); db.cpu_mem_wdata = p[k]; end
      else        begin da.cpu_mem_we = 1; da.cpu_mem_addr = 8'h80 + 8'(k); da.cpu_mem_wdata = p[k]; end
    end
    @(negedge clk);
    da.cpu_mem_we = 0; db.cpu_mem_we = 0;
  endtask

  task automatic cpu_read(input bit node_b, input logic [7:0] addr, output logic [7:0] d);
    @(negedge clk);
    if (node_b) db.cpu_mem_addr = addr; else da.cpu_mem_addr = addr;
    @(negedge clk);
    d = node_b ? b_mem_rdata : a_mem_rdata;
  endtask

  task automatic cpu_tx(input bit node_b, input int len);
    @(negedge clk);
    if (node_b) begin db.cpu_tx_req = 1; db.cpu_tx_len = 7'(len); end
    else        begin da.cpu_tx_req = 1; da.cpu_tx_len = 7'(len); end
    @(negedge clk);
    da.cpu_tx_req = 0; db.cpu_tx_req = 0;
  endtask

  task automatic release_rx(input bit node_b);
    @(negedge clk);
    if (node_b) db.cpu_rx_release = 1; else da.cpu_rx_release = 1;
    @(negedge clk);
    da.cpu_rx_release = 0; db.cpu_rx_release = 0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
  endtask

  // wait until both transmitters and receivers are quiet
  task automatic settle();
    idle(20);
    while (a_busy || b_busy || a_locked || b_locked) @(posedge clk);
    idle(2000);
  endtask

  function automatic logic [15:0] crc_of(input logic [7:0] p[], input logic [15:0] poly);
    logic [15:0] c = '0;
    foreach (p[k]) c = crc_byte(c, p[k], poly);
    return c;
  endfunction

  // frame used by several phases
  function automatic void make_payload(ref logic [7:0] p[], input int n, input int seed);
    p = new[n];
    foreach (p[k]) p[k] = 8'((k * 37 + seed * 11 + 5) ^ (k >> 1));
  endfunction

  // compare what B's host FIFO got with the sent payload and its FCS
  task automatic expect_host_rx(input bit at_b, input logic [7:0] p[], input logic [15:0] fcs,
                                input bit exp_ok, input string tag);
    logic [8:0] q[$];
    q = at_b ? b_hq : a_hq;
    check(q.size() == p.size() + 3, $sformatf("%s: host RX words %0d, expected %0d", tag, q.size(), p.size() + 3));
    if (q.size() == p.size() + 3) begin
      bit same = 1;
      foreach (p[k]) if (q[k] !== {1'b0, p[k]}) same = 0;
      check(same, {tag, ": payload bytes"});
      check(q[p.size()] == {1'b0, fcs[7:0]} && q[p.size()+1] == {1'b0, fcs[15:8]}, {tag, ": FCS bytes"});
      check(q[p.size()+2] == {1'b1, 7'd0, exp_ok}, {tag, ": status word"});
    end
    if (at_b) b_hq.delete(); else a_hq.delete();
  endtask

  logic [7:0] pay[], frm[];
  logic [7:0] d;
  int t0, t1, sfd0;

  initial begin
    da = '{default: '0};
    db = '{default: '0};
    da.host_rx_ready = 1; db.host_rx_ready = 1;
    idle(5);
    rst_n = 1;
    idle(5);

    // ============ 1. host path, standard settings ============
    make_payload(pay, 20, 1);
    t0 = $time;
    sfd0 = b_sfd_n;
    host_send(0, pay, 22);
    settle();
    expect_host_rx(1, pay, crc_of(pay, CRC_POLY_ITU), 1, "host path");
    check(b_sfd_n == sfd0 + 1, "host path: one SFD at B");
    if (b_irq_n == 1 && b_avail && b_rlen == 7'd22) n_host_rx++;
    check(b_avail && b_rlen == 7'd22 && b_fcs, "host path: B's MAC holds the frame");
    for (int k = 0; k < 20; k++) begin
      cpu_read(1, 8'(k), d);
      check(d == pay[k], $sformatf("host path: shared memory byte %0d", k));
    end
    release_rx(1);
    if (b_hq.size() == 0) n_host_rx++;

    // ============ 2. MAC path with ACK request, CSMA/CA on ============
    wreg(0, REG_CTRL, CTRL_RESET | (32'd1 << CTRL_TX_SRC));
    wreg(1, REG_CTRL, CTRL_RESET | (32'd1 << CTRL_TX_SRC));
    a_hq.delete(); b_hq.delete();
    make_payload(pay, 10, 2);
    frm = new[13];
    frm[0] = 8'h21; frm[1] = 8'h88; frm[2] = 8'h42;
    for (int k = 0; k < 10; k++) frm[3+k] = pay[k];
    cpu_write_frame(0, frm);
    t0 = b_irq_n; t1 = a_irq_n;
    cpu_tx(0, 15);
    wait (a_txd_n == 1 || a_txf_n > 0);
    settle();
    check(a_txd_n == 1, "MAC path: A reports tx_done");
    if (a_txd_n == 1) n_csma_ok++;
    check(b_irq_n == t0 + 1 && b_rlen == 7'd15 && b_fcs, "MAC path: B's MAC got the frame");
    for (int k = 0; k < 13; k++) begin
      cpu_read(1, 8'(k), d);
      check(d == frm[k], $sformatf("MAC path: B shared memory byte %0d", k));
    end
    check(b_acks_n == 1, "MAC path: B sent an ACK");
    check(a_irq_n == t1 + 1 && a_rlen == 7'd5 && a_fcs, "MAC path: A received a 5-byte frame");
    cpu_read(0, 8'd0, d); check(d == 8'h02, "ACK frame control low byte");
    cpu_read(0, 8'd1, d); check(d == 8'h00, "ACK frame control high byte");
    cpu_read(0, 8'd2, d); check(d == 8'h42, "ACK sequence number");
    if (b_acks_n == 1 && d == 8'h42) n_ack++;
    release_rx(0); release_rx(1);
    a_hq.delete(); b_hq.delete();

    // ============ 3. CSMA/CA finds the channel busy ============
    wreg(1, REG_CTRL, (CTRL_RESET | (32'd1 << CTRL_TX_SRC)) & ~(32'd1 << CTRL_CCA_EN));
    make_payload(pay, 98, 3);
    frm = new[98];
    foreach (pay[k]) frm[k] = pay[k];
    frm[0] = 8'h01;   // no ACK request
    cpu_write_frame(1, frm);
    make_payload(pay, 8, 4);
    pay[0] = 8'h01;
    cpu_write_frame(0, pay);
    t0 = a_bcca;
    cpu_tx(1, 100);
    idle(2000);       // B is on air
    cpu_tx(0, 10);
    wait (a_txd_n == 2 || a_txf_n > 0);
    settle();
    check(a_bcca > t0, "CSMA: A found the channel busy at least once");
    n_busy_cca += int'(a_bcca) - t0;
    check(b_txd_n == 1, "CSMA: B's long frame went out");
    release_rx(0); release_rx(1);
    a_hq.delete(); b_hq.delete();
    wreg(1, REG_CTRL, CTRL_RESET | (32'd1 << CTRL_TX_SRC));

    // ============ 4. FCS error: A uses another CRC polynomial ============
    wreg(0, REG_TX_CRC_POLY, 32'hA001);
    make_payload(pay, 12, 5);
    pay[0] = 8'h21;   // asks for an ACK, must not get one
    cpu_write_frame(0, pay);
    t0 = b_irq_n; t1 = b_acks_n;
    cpu_tx(0, 14);
    wait (a_txd_n == 3 || a_txf_n > 1);
    settle();
    expect_host_rx(1, pay, crc_of(pay, 16'hA001), 0, "FCS error");
    check(b_irq_n == t0 && !b_avail, "FCS error: B's MAC did not report the frame");
    check(b_acks_n == t1, "FCS error: no ACK");
    if (b_irq_n == t0 && b_acks_n == t1) n_fcs_bad++;
    wreg(0, REG_TX_CRC_POLY, 32'(CRC_POLY_ITU));

    // ============ 5. length limits ============
    wreg(0, REG_TX_MAX_LEN, 10);
    t0 = a_txf_n;
    cpu_tx(0, 14);
    wait (a_txf_n == t0 + 1 || a_txd_n == 4);
    settle();
    check(a_tlerr_n == 1 && a_txf_n == t0 + 1, "TX length limit: refused, tx_fail");
    if (a_tlerr_n == 1) n_tx_len_err++;
    wreg(0, REG_TX_MAX_LEN, 127);
    wreg(1, REG_RX_MAX_LEN, 10);
    t0 = b_irq_n;
    pay[0] = 8'h01;
    cpu_write_frame(0, pay);
    cpu_tx(0, 14);
    wait (a_txd_n == 4 || a_txf_n > t0 + 1);
    settle();
    check(b_rlerr_n == 1 && b_irq_n == t0 && b_hq.size() == 0, "RX length limit: refused");
    if (b_rlerr_n == 1) n_rx_len_err++;
    wreg(1, REG_RX_MAX_LEN, 127);

    // ============ 6. digital shifters: A +5 MHz, B -5 MHz ============
    wreg(0, REG_TX_FCW, 32'h5000_0000);   // 5/16 of 16 Msample/s
    wreg(1, REG_RX_FCW, 32'hB000_0000);
    make_payload(pay, 16, 6);
    pay[0] = 8'h01;
    cpu_write_frame(0, pay);
    t0 = b_irq_n;
    meas_on = 1; ang_sum = 0.0; ang_n = 0;
    cpu_tx(0, 18);
    wait (a_txd_n == 5);
    meas_on = 0;
    settle();
    expect_host_rx(1, pay, crc_of(pay, CRC_POLY_ITU), 1, "shifted channel");
    check(b_irq_n == t0 + 1, "shifted channel: B's MAC got the frame");
    check(ang_n > 1000 && ang_sum / ang_n > 1.90 && ang_sum / ang_n < 2.03,
          $sformatf("shifted channel: mean phase step %f rad, expected 1.963", ang_sum / ang_n));
    if (b_irq_n == t0 + 1) n_shift++;
    release_rx(1);
    // A receive shift wrong by 5 MHz aliases in the one-sample discriminator
    // and a clean frame still gets through; a second frame at +-2.5 MHz
    // makes a wrong receive word visible.
    wreg(0, REG_TX_FCW, 32'h2800_0000);
    wreg(1, REG_RX_FCW, 32'hD800_0000);
    make_payload(pay, 16, 16);
    pay[0] = 8'h01;
    cpu_write_frame(0, pay);
    t0 = b_irq_n;
    cpu_tx(0, 18);
    wait (a_txd_n == 6);
    settle();
    expect_host_rx(1, pay, crc_of(pay, CRC_POLY_ITU), 1, "shifted channel 2.5 MHz");
    check(b_irq_n == t0 + 1, "shifted channel 2.5 MHz: B's MAC got the frame");
    if (b_irq_n == t0 + 1) n_shift++;
    release_rx(1);
    wreg(0, REG_TX_FCW, 0);
    wreg(1, REG_RX_FCW, 0);

    // ============ 7. carrier frequency offset of 100 kHz ============
    cfo_step = 2.0 * 3.14159265358979 * 0.1 / 16.0;
    make_payload(pay, 30, 7);
    pay[0] = 8'h01;
    cpu_write_frame(0, pay);
    t0 = b_irq_n;
    cpu_tx(0, 32);
    wait (a_txd_n == 7);
    settle();
    expect_host_rx(1, pay, crc_of(pay, CRC_POLY_ITU), 1, "CFO 100 kHz");
    if (b_irq_n == t0 + 1) n_cfo++;
    release_rx(1);
    cfo_step = 0.0;

    // ============ 8. half and full duplex ============
    wreg(0, REG_CTRL, (CTRL_RESET | (32'd1 << CTRL_TX_SRC)) & ~(32'd1 << CTRL_CCA_EN));
    wreg(1, REG_CTRL, (CTRL_RESET | (32'd1 << CTRL_TX_SRC)) & ~(32'd1 << CTRL_CCA_EN));
    make_payload(pay, 20, 8);
    pay[0] = 8'h01;
    cpu_write_frame(0, pay);
    cpu_write_frame(1, pay);
    t0 = a_sfd_n; t1 = b_sfd_n;
    fork cpu_tx(0, 22); cpu_tx(1, 22); join
    wait (a_txd_n == 8 && b_txd_n == 2);
    settle();
    check(a_sfd_n == t0 && b_sfd_n == t1, "half duplex: neither node hears the other while sending");
    if (a_sfd_n == t0 && b_sfd_n == t1) n_hd_block++;
    a_hq.delete(); b_hq.delete();
    wreg(0, REG_CTRL, (CTRL_RESET | (32'd1 << CTRL_TX_SRC) | (32'd1 << CTRL_FULL_DUP)) & ~(32'd1 << CTRL_CCA_EN));
    wreg(1, REG_CTRL, (CTRL_RESET | (32'd1 << CTRL_TX_SRC) | (32'd1 << CTRL_FULL_DUP)) & ~(32'd1 << CTRL_CCA_EN));
    t0 = a_irq_n; t1 = b_irq_n;
    fork cpu_tx(0, 22); cpu_tx(1, 22); join
    wait (a_txd_n == 9 && b_txd_n == 3);
    settle();
    expect_host_rx(1, pay, crc_of(pay, CRC_POLY_ITU), 1, "full duplex A->B");
    expect_host_rx(0, pay, crc_of(pay, CRC_POLY_ITU), 1, "full duplex B->A");
    check(a_irq_n == t0 + 1 && b_irq_n == t1 + 1, "full duplex: both MACs got a frame");
    if (a_irq_n == t0 + 1 && b_irq_n == t1 + 1) n_fd++;
    release_rx(0); release_rx(1);

    // ============ 9. non-standard chipping sequences ============
    begin
      chip_tab_t st;
      st = std_chip_tab();
      for (int k = 0; k < 16; k++) begin
        wreg(0, REG_CHIP_BASE + 8'(k), st[(k + 5) % 16] ^ 32'h0F0F_00FF);
        wreg(1, REG_CHIP_BASE + 8'(k), st[(k + 5) % 16] ^ 32'h0F0F_00FF);
      end
      make_payload(pay, 14, 9);
      pay[0] = 8'h01;
      cpu_write_frame(0, pay);
      t0 = b_irq_n;
      cpu_tx(0, 16);
      wait (a_txd_n == 10);
      settle();
      expect_host_rx(1, pay, crc_of(pay, CRC_POLY_ITU), 1, "custom chip table");
      check(b_irq_n == t0 + 1, "custom chip table: B's MAC got the frame");
      release_rx(1);
      // only B back to the standard table: nothing valid may arrive
      for (int k = 0; k < 16; k++) wreg(1, REG_CHIP_BASE + 8'(k), st[k]);
      t1 = b_irq_n;
      cpu_tx(0, 16);
      wait (a_txd_n == 11);
      settle();
      check(b_irq_n == t1, "mismatched chip tables: no frame delivered");
      if (b_irq_n == t0 + 1 && b_irq_n == t1) n_chiptab++;
    end

    // ============ 10. reception in white noise ============
    // Constant envelope 16383; noise of 8192 rms per component is a
    // per-sample SNR of 3 dB over 16 MHz, about 12 dB in the 2 MHz band.
    std_tab = std_chip_tab();
    for (int k = 0; k < 16; k++) wreg(0, REG_CHIP_BASE + 8'(k), std_tab[k]);
    noise_sd = 8192.0;
    for (int n = 0; n < 4; n++) begin
      make_payload(pay, 40, 20 + n);
      pay[0] = 8'h01;
      cpu_write_frame(0, pay);
      t0 = b_irq_n;
      t1 = a_txd_n;
      cpu_tx(0, 42);
      wait (a_txd_n == t1 + 1);
      settle();
      expect_host_rx(1, pay, crc_of(pay, CRC_POLY_ITU), 1, $sformatf("noise, frame %0d", n));
      if (b_irq_n == t0 + 1 && b_fcs) n_noise++;
      release_rx(1);
    end
    noise_sd = 0.0;

    // ============ every mechanism must have happened ============
    $display("events: host_rx=%0d ack=%0d csma_ok=%0d busy_cca=%0d fcs_bad=%0d tx_len_err=%0d rx_len_err=%0d shift=%0d cfo=%0d half_duplex_block=%0d full_duplex=%0d chip_table=%0d noise=%0d",
             n_host_rx, n_ack, n_csma_ok, n_busy_cca, n_fcs_bad, n_tx_len_err, n_rx_len_err,
             n_shift, n_cfo, n_hd_block, n_fd, n_chiptab, n_noise);
    check(n_host_rx > 0, "mechanism: host path");
    check(n_ack > 0, "mechanism: ACK");
    check(n_csma_ok > 0, "mechanism: CSMA/CA success");
    check(n_busy_cca > 0, "mechanism: busy CCA");
    check(n_fcs_bad > 0, "mechanism: FCS error");
    check(n_tx_len_err > 0, "mechanism: TX length refused");
    check(n_rx_len_err > 0, "mechanism: RX length refused");
    check(n_shift == 2, "mechanism: digital shift");
    check(n_cfo > 0, "mechanism: CFO compensation");
    check(n_hd_block > 0, "mechanism: half duplex");
    check(n_fd > 0, "mechanism: full duplex");
    check(n_chiptab > 0, "mechanism: chip table");
    check(n_noise == 4, "reception in noise: all four frames");
    $display("end-to-end test finished at cycle %0d", $time / 10);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
