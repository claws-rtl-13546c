`timescale 1ns/1ps
// tb_packet_extractor: symbols of PHR and PSDU go in; the PSDU bytes,
// first/last marks and the FCS verdict come out. The FCS is computed here
// with an MSB-first CRC on bit-reversed octets, independent of the RTL.
// Stimulus and sizes are this testbench's own; the FCS is computed here by a different CRC formulation, not taken
// from the RTL.
module tb_packet_extractor;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sof = 0, sym_valid = 0, crc_en = 1;
  logic [3:0] sym = 0;
  logic [15:0] crc_poly = 16'h8408;
  logic [6:0] max_len = 127, len;
  logic [7:0] byte_data;
  logic byte_valid, first, last, done, fcs_ok, len_err, drop, busy;
  int checks = 0, failures = 0, ndone = 0, nlerr = 0, nfirst = 0, nlast = 0;
  logic [7:0] got[$];
  logic last_ok;

  packet_extractor dut (.*);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [15:0] fcs_of(input logic [7:0] p[$], input logic [15:0] poly_n);
    logic [15:0] c = 0, r;
    foreach (p[i]) for (int k = 0; k < 8; k++) begin
      logic fb = c[15] ^ p[i][k];
      c = {c[14:0], 1'b0};
      if (fb) c ^= poly_n;
    end
    for (int k = 0; k < 16; k++) r[k] = c[15-k];
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (byte_valid) got.push_back(byte_data);
    if (first) nfirst++;
    if (last) nlast++;
    if (done) begin ndone++; last_ok = fcs_ok; end
    if (len_err) nlerr++;
  end

  task automatic send_bytes(input logic [7:0] b[$]);
    @(negedge clk); sof = 1; @(negedge clk); sof = 0;
    foreach (b[k]) for (int h = 0; h < 2; h++) begin
      repeat (3) @(negedge clk);
      sym = h ? b[k][7:4] : b[k][3:0]; sym_valid = 1;
      @(negedge clk); sym_valid = 0;
    end
    repeat (4) @(negedge clk);
  endtask

  task automatic packet(input int n, input bit corrupt, input logic [15:0] pol_n, input string tag);
    logic [7:0] p[$], f[$];
    logic [15:0] c;
    int d0 = ndone;
    for (int k = 0; k < n; k++) p.push_back(8'($urandom));
    c = fcs_of(p, pol_n);
    f.push_back(8'(n + 2));
    foreach (p[k]) f.push_back(p[k]);
    f.push_back(c[7:0]); f.push_back(c[15:8]);
    if (corrupt) f[3] ^= 8'h10;
    got.delete(); nfirst = 0; nlast = 0;
    send_bytes(f);
    check(ndone == d0 + 1 && got.size() == n + 2 && nfirst == 1 && nlast == 1, {tag, ": PSDU length and marks"});
    if (got.size() == n + 2) begin
      bit ok = 1;
      for (int k = 0; k < n + 2; k++) if (got[k] != f[k+1]) ok = 0;
      check(ok, {tag, ": PSDU bytes"});
    end
    check(last_ok == (!corrupt || !crc_en), {tag, ": FCS verdict"});
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    packet(10, 0, 16'h1021, "good frame");
    packet(10, 1, 16'h1021, "corrupted frame");
    packet(125, 0, 16'h1021, "127-byte frame");
    crc_poly = 16'hA001;
    packet(7, 0, 16'h8005, "other polynomial");
    crc_en = 0;
    packet(7, 1, 16'h8005, "FCS check off");   // corrupt, but accepted
    crc_en = 1; crc_poly = 16'h8408;
    max_len = 20;
    got.delete();
    send_bytes('{8'd30});
    check(nlerr == 1 && got.size() == 0, "length above maximum refused");
    send_bytes('{8'd1});
    check(nlerr == 2, "length shorter than FCS refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
