`timescale 1ns/1ps
// tb_tx_loader: a packet from the host FIFO stream (length word then
// payload) and one from the MAC, each delivered to a framer model that
// takes bytes at random; the origin switch decides which source is read.
// Stimulus and sizes are this testbench's own; expected octets are the ones the testbench queued, not taken
// from the RTL.
module tb_tx_loader;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic src_sel = 0, tx_busy = 0;
  logic host_valid = 0, host_ready;
  logic [8:0] host_data = 0;
  logic mac_start = 0, mac_valid = 0, mac_ready;
  logic [6:0] mac_len = 0;
  logic [7:0] mac_data = 0;
  logic f_start, f_valid, f_ready = 0, f_done = 0;
  logic [6:0] f_len;
  logic [7:0] f_data;
  int checks = 0, failures = 0;
  logic [8:0] hq[$];
  logic [7:0] got[$];
  int nstart = 0;
  logic [6:0] last_len;
  int want = 0;

  tx_loader dut (.*);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // host FIFO model
  always_comb begin
    host_valid = hq.size() > 0;
    host_data  = hq.size() > 0 ? hq[0] : '0;
  end
  // framer model: takes `want' bytes after a start, then pulses f_done
  always @(posedge clk) if (rst_n) begin
    f_done <= 0;
    if (host_valid && host_ready) void'(hq.pop_front());
    if (f_start) begin nstart++; last_len = f_len; want = f_len - 2; end
    if (f_valid && f_ready) begin
      got.push_back(f_data);
      want--;
      if (want == 0) f_done <= 1;
    end
    f_ready <= ($urandom % 2) && want > 0;
  end
  // MAC byte source
  int midx = 0;
  always_comb begin mac_valid = 1; mac_data = 8'(200 + midx); end
  always @(posedge clk) if (rst_n && mac_valid && mac_ready) midx++;

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // host packet: length 7 (5 payload bytes + FCS)
    hq.push_back(9'd7);
    for (int k = 0; k < 5; k++) hq.push_back(9'(k + 1));
    mac_start = 1; mac_len = 7'd9;   // ignored while the host is selected
    repeat (200) @(posedge clk);
    check(nstart == 1 && last_len == 7'd7, "host packet started with its length");
    check(got.size() == 5 && got[0] == 8'd1 && got[4] == 8'd5, "host payload forwarded in order");
    check(hq.size() == 0, "host FIFO drained");
    check(midx == 0, "MAC not read while host selected");
    got.delete();
    // switch to the MAC
    src_sel = 1;
    repeat (200) @(posedge clk);
    mac_start = 0;
    check(nstart >= 2 && last_len == 7'd9, "MAC packet started with its length");
    check(got.size() >= 7 && got[0] == 8'd200 && got[6] == 8'd206, "MAC bytes forwarded");
    // busy blocks a start
    repeat (100) @(posedge clk);
    got.delete(); tx_busy = 1; src_sel = 0;
    hq.push_back(9'd3); hq.push_back(9'd55);
    repeat (50) @(posedge clk);
    check(hq.size() == 2, "no start while the chain is busy");
    tx_busy = 0;
    repeat (50) @(posedge clk);
    check(hq.size() == 0 && got.size() == 1 && got[0] == 8'd55, "started when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
