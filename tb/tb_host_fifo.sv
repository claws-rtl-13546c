`timescale 1ns/1ps
// tb_host_fifo: random pushes and pops against a queue model; checks
// order, data, level, full and empty. DEPTH reduced to 16 so that full is
// reached quickly.
// Stimulus and sizes are this testbench's own; a queue in the testbench is the reference, not taken
// from the RTL.
module tb_host_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 0;
  logic [8:0] wr_data = 0, rd_data;
  logic [4:0] level;
  int checks = 0, failures = 0, nfull = 0, nempty = 0;
  logic [8:0] model[$];

  host_fifo #(.DEPTH(16), .WIDTH(9)) dut (.*);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check(level == model.size(), "level");
      check(wr_ready == (model.size() < 16), "ready = not full");
      check(rd_valid == (model.size() > 0), "valid = not empty");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      if (model.size() == 16) nfull++;
      if (model.size() == 0) nempty++;
      // phases: fill-biased, then drain-biased
      wr_valid = ($urandom % 100) < ((cyc / 500) % 2 ? 30 : 70);
      rd_ready = ($urandom % 100) < ((cyc / 500) % 2 ? 70 : 30);
      wr_data  = 9'($urandom);
      @(posedge clk);
      if (wr_valid && wr_ready) model.push_back(wr_data);
      if (rd_valid && rd_ready) void'(model.pop_front());
    end
    check(nfull > 0 && nempty > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
