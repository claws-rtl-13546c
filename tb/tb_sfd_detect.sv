`timescale 1ns/1ps
// tb_sfd_detect: a synthetic correlator stream (one output per chip,
// aligned outputs every 32nd chip with full score, the rest weak) with
// preamble, SFD and data symbols. Checks the SFD interrupt, the data
// symbols passed on and the cases that must not lock: a wrong SFD, too
// short a preamble, another SFD value, and return to search on drop.
// Stimulus and sizes are this testbench's own; the expected symbols are those the stimulus placed after the SFD, not taken
// from the RTL.
module tb_sfd_detect;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 1, drop = 0;
  logic [7:0] sfd = 8'hA7;
  logic [3:0] sym = 0, out_sym;
  logic [4:0] score = 0;
  logic valid = 0, sfd_irq, out_valid, locked;
  int checks = 0, failures = 0, nirq = 0;
  logic [3:0] outs[$];

  sfd_detect #(.SCORE_MIN(26), .PRE_MIN(2)) dut (.*);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (sfd_irq) nirq++;
    if (out_valid) outs.push_back(out_sym);
  end

  task automatic slot(input logic [3:0] s, input int sc);
    for (int j = 0; j < 32; j++) begin
      @(negedge clk);
      valid = 1;
      if (j == 0) begin sym = s; score = 5'(sc); end
      else begin sym = 4'($urandom % 15 + 1); score = 5'($urandom % 20); end
      @(negedge clk); valid = 0;
    end
  endtask

  task automatic frame(input int npre, input logic [7:0] f, input int ndata, input string tag,
                       input bit expect_lock);
    int n0 = nirq;
    outs.delete();
    for (int k = 0; k < 10; k++) begin @(negedge clk); valid = 1; sym = 4'($urandom); score = 5'($urandom % 20); @(negedge clk); valid = 0; end
    for (int k = 0; k < npre; k++) slot(4'd0, 31);
    slot(f[3:0], 30);
    slot(f[7:4], 29);
    for (int k = 0; k < ndata; k++) slot(4'(k * 3 + 1), 27);
    check(nirq == n0 + (expect_lock ? 1 : 0), {tag, ": SFD interrupt"});
    if (expect_lock) begin
      bit ok = (outs.size() == ndata);
      for (int k = 0; k < ndata && k < outs.size(); k++) if (outs[k] != 4'(k * 3 + 1)) ok = 0;
      check(ok, $sformatf("%s: %0d data symbols passed on", tag, outs.size()));
    end else check(outs.size() == 0, {tag, ": nothing passed on"});
    @(negedge clk); drop = 1; @(negedge clk); drop = 0;
    check(!locked, {tag, ": back to search after drop"});
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    frame(8, 8'hA7, 6, "standard", 1);
    frame(8, 8'hA5, 6, "wrong SFD", 0);
    frame(1, 8'hA7, 6, "short preamble", 0);
    sfd = 8'h3C;
    frame(4, 8'h3C, 5, "other SFD", 1);
    frame(4, 8'hA7, 5, "old SFD after change", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
