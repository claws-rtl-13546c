`timescale 1ns/1ps
// tb_cca: RSSI is the mean of I^2+Q^2 over each block of 2^WIN_LOG2
// samples (WIN_LOG2 reduced to 5); clear follows the threshold; a result
// every 32 clocks.
// Stimulus and sizes are this testbench's own; the RSSI is recomputed here from the same samples, not taken
// from the RTL.
module tb_cca;
  localparam int W = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [15:0] in_i = 0, in_q = 0;
  logic [31:0] thresh = 32'd1_000_000, rssi;
  logic valid, clear;
  int checks = 0, failures = 0, nvalid = 0, last_v = 0, cyc = 0;
  longint acc = 0;
  longint exp_q[$];

  cca #(.WIN_LOG2(W)) dut (.*);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  int smp = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    acc += longint'(in_i) * in_i + longint'(in_q) * in_q;
    smp++;
    if (smp == (1 << W)) begin exp_q.push_back(acc >> W); acc = 0; smp = 0; end
    if (valid) begin
      nvalid++;
      if (nvalid > 1) check(cyc - last_v == (1 << W), "one result per block");
      last_v = cyc;
      check(exp_q.size() > 0 && rssi == 32'(exp_q[0]), $sformatf("rssi %0d", rssi));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 640; n++) begin
      if (n < 160)      begin in_i = 16'($urandom % 200) - 16'd100; in_q = 16'($urandom % 200) - 16'd100; end
      else if (n < 480) begin in_i = 16'($urandom % 8000) - 16'd4000; in_q = 16'd3000; end
      else              begin in_i = 16'sd32767; in_q = -16'sd32768; end
      @(negedge clk);
      if (valid) check(clear == (rssi < thresh), "clear = rssi below threshold");
      if (n == 150) check(clear, "quiet channel is clear");
      if (n == 470) check(!clear, "loud channel is busy");
    end
    check(nvalid >= 19, "results produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
