`timescale 1ns/1ps
// tb_msk_demod: a half-sine O-QPSK signal is generated here in real
// arithmetic from random chips, with a fractional sampling offset and,
// in further runs, carrier offsets up to 150 kHz at 16 Msample/s and white
// noise. After
// acquisition the demodulated chips must equal the MSK form of the chips,
// d[m] = c[m] ^ c[m-1] ^ (m odd), one every OSR clocks.
// Stimulus and sizes are this testbench's own; the signal and the expected MSK chips are computed here in real arithmetic, not taken
// from the RTL.
module tb_msk_demod;
  localparam int OSR = 8;
  localparam int NCH = 600;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 1;
  logic signed [15:0] in_i = 0, in_q = 0;
  logic chip, chip_valid;
  int checks = 0, failures = 0;
  logic got[$];
  int vt[$];
  int cyc = 0;

  msk_demod #(.OSR(OSR)) dut (.*);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (chip_valid) begin got.push_back(chip); vt.push_back(cyc); end
  end

  function automatic real gauss();   // approximately N(0,1)
    real x = 0.0;
    for (int k = 0; k < 12; k++) x += real'($urandom_range(0, 999999)) / 1000000.0;
    return x - 6.0;
  endfunction

  function automatic real hs(input real t);   // half-sine over [0, 2)
    return (t >= 0.0 && t < 2.0) ? $sin(3.14159265358979 * t / 2.0) : 0.0;
  endfunction

  task automatic run(input real frac, input real cfo_hz, input string tag,
                     input real sd = 0.0, input int max_err = 0);
    logic c[NCH];
    logic d[NCH];
    int best_off, best_match, m0;
    for (int k = 0; k < NCH; k++) c[k] = 1'($urandom);
    for (int m = 1; m < NCH; m++) d[m] = c[m] ^ c[m-1] ^ m[0];
    got.delete(); vt.delete();
    for (int n = 0; n < (NCH + 4) * OSR; n++) begin
      real t = (real'(n) + frac) / OSR;   // time in chip periods
      real vi = 0.0, vq = 0.0, ph;
      int k0 = int'($floor(t)) - 2;
      for (int k = (k0 < 0 ? 0 : k0); k <= k0 + 3 && k < NCH; k++) begin
        real a = c[k] ? 1.0 : -1.0;
        if (k % 2 == 0) vi += a * hs(t - k); else vq += a * hs(t - k);
      end
      ph = 2.0 * 3.14159265358979 * cfo_hz / 16.0e6 * n;
      @(negedge clk);
      in_i = 16'($rtoi(16000.0 * (vi * $cos(ph) - vq * $sin(ph)) + sd * gauss()));
      in_q = 16'($rtoi(16000.0 * (vi * $sin(ph) + vq * $cos(ph)) + sd * gauss()));
    end
    @(negedge clk); in_i = 0; in_q = 0;
    repeat (20) @(negedge clk);
    // align: find the offset where got matches d[150..], after acquisition (the preamble is 256 chips long)
    best_match = -1; best_off = 0;
    for (int off = -8; off < 40; off++) begin
      int mt = 0;
      for (int m = 150; m < 300; m++) if (m - off >= 0 && m - off < got.size() && got[m - off] == d[m]) mt++;
      if (mt > best_match) begin best_match = mt; best_off = off; end
    end
    check(best_match >= 150 - max_err, $sformatf("%s: chips 150..299 all correct (%0d of 150)", tag, best_match));
    m0 = 0;
    for (int m = 300; m < NCH - 2; m++) if (m - best_off >= 0 && m - best_off < got.size() && got[m - best_off] != d[m]) m0++;
    check(m0 <= max_err, $sformatf("%s: %0d errors in chips 300..end", tag, m0));
    // one chip per OSR clocks; a change of sampling phase by the timing
    // tracker may stretch or shorten a single interval now and then
    m0 = 0;
    for (int k = 50; k < 500 && k < vt.size(); k++)
      if (vt[k] - vt[k-1] != OSR) m0++;
    check(m0 <= 2 + 2 * max_err, $sformatf("%s: one chip per OSR clocks (%0d irregular intervals)", tag, m0));
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run(0.0, 0.0, "aligned");
    run(0.37, 0.0, "sampling offset");
    run(0.6, 100.0e3, "CFO 100 kHz");
    run(0.0, 30.0e3, "CFO 30 kHz");
    run(0.2, -150.0e3, "CFO -150 kHz");
    // white noise of 4000 rms per component (9 dB per sample): the input
    // filter keeps chip errors rare
    run(0.3, 50.0e3, "noise", 4000.0, 3);
    // disabled: no chips
    en = 0; got.delete();
    repeat (200) @(negedge clk);
    check(got.size() == 0, "no chips while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
