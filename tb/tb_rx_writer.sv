`timescale 1ns/1ps
// tb_rx_writer: routes packets to host, MAC or both; host framing with a
// trailing status word; overflow count when the host FIFO refuses.
// Stimulus and sizes are this testbench's own; expected FIFO words are built here from the input octets, not taken
// from the RTL.
module tb_rx_writer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] dst = 0;
  logic [7:0] byte_data = 0;
  logic byte_valid = 0, first = 0, last = 0, done = 0, fcs_ok = 0;
  logic host_valid, host_ready = 1;
  logic [8:0] host_data;
  logic [15:0] overflow;
  logic [7:0] mac_data;
  logic mac_valid, mac_first, mac_last, mac_done, mac_fcs_ok;
  int checks = 0, failures = 0;
  logic [8:0] hq[$];
  logic [7:0] mq[$];
  int mdone = 0;

  rx_writer dut (.*);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (host_valid && host_ready) hq.push_back(host_data);
    if (mac_valid) mq.push_back(mac_data);
    if (mac_done) mdone++;
  end

  task automatic send(input int n, input bit ok);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      byte_valid = 1; byte_data = 8'(k + 10); first = (k == 0); last = (k == n - 1);
      done = (k == n - 1); fcs_ok = ok;
      @(negedge clk);
      byte_valid = 0; first = 0; last = 0; done = 0;
      repeat (5) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    dst = 2'b01; send(4, 1);
    check(hq.size() == 5 && hq[0] == 9'd10 && hq[3] == 9'd13 && hq[4] == 9'h101, "host only: bytes and status ok");
    check(mq.size() == 0 && mdone == 0, "host only: MAC gets nothing");
    hq.delete();
    dst = 2'b10; send(3, 0);
    check(hq.size() == 0, "MAC only: host gets nothing");
    check(mq.size() == 3 && mq[2] == 8'd12 && mdone == 1, "MAC only: bytes and done");
    mq.delete();
    dst = 2'b11; send(2, 0);
    check(hq.size() == 3 && hq[2] == 9'h100 && mq.size() == 2 && mdone == 2, "both: status shows FCS error");
    hq.delete();
    host_ready = 0; dst = 2'b01; send(2, 1);
    check(overflow == 16'd3 && hq.size() == 0, "overflow counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
