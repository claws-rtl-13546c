`timescale 1ns/1ps
// tb_tx_framer: PPDU symbol order for packets with and without FCS, a
// changed SFD and polynomial, and refused lengths. The expected symbols
// and the CRC are computed here bit by bit (MSB-first ITU-T CRC-16 over
// bit-reversed octets, then reversed back), independently of the RTL.
// Stimulus and sizes are this testbench's own; the FCS is computed here by a different CRC formulation, not taken
// from the RTL.
module tb_tx_framer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, crc_en = 1;
  logic [6:0] len = 0, max_len = 127;
  logic [15:0] crc_poly = 16'h8408;
  logic [7:0] sfd = 8'hA7;
  logic byte_valid, byte_ready;
  logic [7:0] byte_data;
  logic [3:0] sym;
  logic sym_valid, sym_ready = 0, busy, byte_done, err_len;
  int checks = 0, failures = 0, nerr = 0;
  logic [7:0] src[$];
  logic [3:0] got[$];

  tx_framer #(.PREAMBLE_SYMS(8)) dut (.*);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [7:0] rev8(input logic [7:0] b);
    for (int k = 0; k < 8; k++) rev8[k] = b[7-k];
  endfunction
  function automatic logic [15:0] rev16(input logic [15:0] b);
    for (int k = 0; k < 16; k++) rev16[k] = b[15-k];
  endfunction
  // textbook MSB-first CRC with the non-reflected polynomial
  function automatic logic [15:0] crc_msb(input logic [7:0] p[$], input logic [15:0] poly_n);
    logic [15:0] c = 0;
    foreach (p[i]) begin
      logic [7:0] b = rev8(p[i]);
      for (int k = 7; k >= 0; k--) begin
        logic fb = c[15] ^ b[k];
        c = {c[14:0], 1'b0};
        if (fb) c ^= poly_n;
      end
    end
    return rev16(c);
  endfunction

  assign byte_valid = src.size() > 0;
  assign byte_data  = src.size() > 0 ? src[0] : 8'h00;
  always @(posedge clk) if (rst_n) begin
    if (byte_valid && byte_ready) void'(src.pop_front());
    if (sym_valid && sym_ready) got.push_back(sym);
    if (err_len) nerr++;
    sym_ready <= ($urandom % 4) != 0;
  end

  task automatic run(input int n, input bit fcs, input logic [7:0] s, input logic [15:0] pol_r,
                     input logic [15:0] pol_n, input string tag);
    logic [7:0] pay[$], exp_b[$];
    logic [15:0] c;
    for (int k = 0; k < n; k++) pay.push_back(8'($urandom));
    src = pay;
    got.delete();
    crc_en = fcs; sfd = s; crc_poly = pol_r;
    @(negedge clk); start = 1; len = 7'(fcs ? n + 2 : n);
    @(negedge clk); start = 0;
    @(negedge clk);
    while (busy) @(negedge clk);
    repeat (4) exp_b.push_back(8'h00);
    exp_b.push_back(s);
    exp_b.push_back(8'(fcs ? n + 2 : n));
    foreach (pay[k]) exp_b.push_back(pay[k]);
    if (fcs) begin
      c = crc_msb(pay, pol_n);
      exp_b.push_back(c[7:0]); exp_b.push_back(c[15:8]);
    end
    check(got.size() == 2 * exp_b.size(), $sformatf("%s: %0d symbols, expected %0d", tag, got.size(), 2 * exp_b.size()));
    if (got.size() == 2 * exp_b.size()) begin
      bit ok = 1;
      foreach (exp_b[k]) if (got[2*k] != exp_b[k][3:0] || got[2*k+1] != exp_b[k][7:4]) ok = 0;
      check(ok, {tag, ": symbol values, low nibble first"});
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run(10, 1, 8'hA7, 16'h8408, 16'h1021, "standard FCS");
    run(1,  1, 8'hA7, 16'h8408, 16'h1021, "one byte");
    run(5,  0, 8'hA7, 16'h8408, 16'h1021, "no FCS");
    run(20, 1, 8'h3C, 16'hA001, 16'h8005, "other SFD and CRC-16/IBM polynomial");
    run(125, 1, 8'hA7, 16'h8408, 16'h1021, "maximum length");
    // 802.15.4 FCS check value: "123456789" gives 0x2189 (CRC-16/KERMIT)
    begin
      logic [7:0] nine[$] = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
      check(crc_msb(nine, 16'h1021) == 16'h2189, "reference CRC check value");
    end
    // refused lengths
    max_len = 20; crc_en = 1;
    @(negedge clk); start = 1; len = 21; @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    @(negedge clk); start = 1; len = 1; @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    check(nerr == 2 && !busy, "over-long and too-short lengths refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
