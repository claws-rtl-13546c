`timescale 1ns/1ps
// tb_chip_spreader: every symbol is expanded to its 32 chips, c0 first,
// from the table it is given; checked against sequences typed from the
// 802.15.4 standard and against a replaced table entry.
module tb_chip_spreader;
  import claws_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  chip_tab_t chip_tab;
  logic [3:0] sym = 0;
  logic sym_valid = 0, sym_ready, chip, chip_valid, chip_ready = 0, busy;
  int checks = 0, failures = 0;
  logic got[$];

  chip_spreader dut (.*);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (chip_valid && chip_ready) got.push_back(chip);
    chip_ready <= ($urandom % 3) == 0;
  end

  task automatic send(input logic [3:0] s, input logic [0:31] exp_seq, input string tag);
    got.delete();
    @(negedge clk); sym = s; sym_valid = 1;
    while (!sym_ready) @(negedge clk);
    @(negedge clk); sym_valid = 0;
    while (busy) @(negedge clk);
    check(got.size() == 32, {tag, ": 32 chips"});
    if (got.size() == 32) begin
      bit ok = 1;
      for (int j = 0; j < 32; j++) if (got[j] != exp_seq[j]) ok = 0;
      check(ok, {tag, ": chip values"});
    end
  endtask

  initial begin
    chip_tab = std_chip_tab();
    repeat (3) @(posedge clk); rst_n = 1;
    send(4'd0,  32'b11011001110000110101001000101110, "symbol 0");
    send(4'd1,  32'b11101101100111000011010100100010, "symbol 1");
    send(4'd7,  32'b10011100001101010010001011101101, "symbol 7");
    send(4'd8,  32'b10001100100101100000011101111011, "symbol 8");
    send(4'd15, 32'b11001001011000000111011110111000, "symbol 15");
    chip_tab[5] = 32'h1234_5678;
    send(4'd5, {<<{32'h1234_5678}}, "replaced entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
