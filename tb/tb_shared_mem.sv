`timescale 1ns/1ps
// tb_shared_mem: random reads and writes on both ports against an array
// model; one-clock read latency; port A wins a same-address write.
// Stimulus and sizes are this testbench's own; an array in the testbench is the reference, not taken
// from the RTL.
module tb_shared_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_we = 0, b_we = 0;
  logic [7:0] a_addr = 0, b_addr = 0, a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  shared_mem #(.BYTES(256)) dut (.*);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    // initialise through both ports
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      a_we = 1; a_addr = 8'(k); a_wdata = 8'(k * 3 + 1);
      model[k] = 8'(k * 3 + 1);
    end
    @(negedge clk); a_we = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic [7:0] ea, eb;
      @(negedge clk);
      a_we = ($urandom % 3) == 0; b_we = ($urandom % 3) == 0;
      a_addr = 8'($urandom); b_addr = (cyc % 10 == 0) ? a_addr : 8'($urandom);
      a_wdata = 8'($urandom); b_wdata = 8'($urandom);
      ea = model[a_addr]; eb = model[b_addr];
      if (b_we) model[b_addr] = b_wdata;
      if (a_we) model[a_addr] = a_wdata;
      @(negedge clk);
      check(a_rdata == ea, "port A read (old data)");
      check(b_rdata == eb, "port B read (old data)");
      a_we = 0; b_we = 0;
    end
    for (int k = 0; k < 256; k++) begin
      @(negedge clk); b_addr = 8'(k);
      @(negedge clk); check(b_rdata == model[k], "final contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
