`timescale 1ns/1ps
// tb_chip_correlator: MSK chips of random symbols (the transform is
// computed here from the chip table) are fed one every few clocks; at each
// symbol's last chip the output must name that symbol with score 31, or
// 31 minus the number of chips flipped on purpose.
// Stimulus and sizes are this testbench's own; the MSK form of each symbol is computed here from the chip table, not taken
// from the RTL.
module tb_chip_correlator;
  import claws_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  chip_tab_t chip_tab;
  logic chip = 0, chip_valid = 0;
  logic [3:0] sym;
  logic [4:0] score;
  logic valid;
  int checks = 0, failures = 0;

  chip_correlator dut (.*);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    logic prev_c31 = 0;
    chip_tab = std_chip_tab();
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [3:0] s;
      int nflip;
      int flips[3];
      s = 4'($urandom);
      nflip = (n >= 100) ? n % 4 : 0;
      flips = '{5, 17, 29};
      for (int m = 0; m < 32; m++) begin
        logic dm, cm, cm1;
        cm  = chip_tab[s][m];
        cm1 = (m == 0) ? prev_c31 : chip_tab[s][m-1];
        dm = cm ^ cm1 ^ (m % 2 == 1);
        for (int f = 0; f < nflip; f++) if (flips[f] == m) dm = !dm;
        @(negedge clk); chip = dm; chip_valid = 1;
        @(negedge clk); chip_valid = 0;
        check(valid, "one output per chip");
        if (m == 31) check(sym == s && score == 5'(31 - nflip),
                           $sformatf("symbol %0d score %0d, expected %0d / %0d", sym, score, s, 31 - nflip));
        @(negedge clk);
      end
      prev_c31 = chip_tab[s][31];
    end
    // a custom table is followed
    chip_tab[3] = 32'hF0F0_3C3C;
    for (int m = 0; m < 32; m++) begin
      @(negedge clk); chip = chip_tab[3][m] ^ (m == 0 ? 1'b0 : chip_tab[3][m-1]) ^ (m % 2 == 1); chip_valid = 1;
      @(negedge clk); chip_valid = 0;
    end
    check(sym == 4'd3 && score == 5'd31, "custom table entry recognised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
