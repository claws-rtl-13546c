`timescale 1ns/1ps
// tb_pulse_shaper: half-sine and rectangular pulse values, sign from the
// chip, linear gain, zero when no pulse runs; one clock of latency.
// Stimulus and sizes are this testbench's own; the expected samples are computed here with $sin, not taken
// from the RTL.
module tb_pulse_shaper;
  localparam int OSR = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic shape_sel = 0;
  logic [7:0] gain = 128;
  logic i_act = 0, i_bit = 0, q_act = 0, q_bit = 0;
  logic [3:0] i_ph = 0, q_ph = 0;
  logic signed [15:0] i_out, q_out;
  int checks = 0, failures = 0;

  pulse_shaper #(.OSR(OSR)) dut (.*);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic int expect_v(input bit act, input bit b, input int ph, input bit rect, input int g);
    real v;
    if (!act) return 0;
    v = rect ? 16383.0 : 16383.0 * $sin(3.14159265358979 * (real'(ph) + 0.5) / (2.0 * OSR));
    v = v * real'(g) / 128.0;
    return b ? int'(v) : -int'(v);
  endfunction

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int ei, eq;
      @(negedge clk);
      i_act = $urandom % 4 != 0; q_act = $urandom % 4 != 0;
      i_bit = 1'($urandom); q_bit = 1'($urandom);
      i_ph = 4'($urandom); q_ph = 4'($urandom);
      shape_sel = (n >= 300); gain = (n < 100) ? 8'd128 : 8'($urandom);
      ei = expect_v(i_act, i_bit, i_ph, shape_sel, gain);
      eq = expect_v(q_act, q_bit, q_ph, shape_sel, gain);
      @(negedge clk);
      check(i_out - ei <= 2 && ei - i_out <= 2, $sformatf("I sample %0d vs %0d", i_out, ei));
      check(q_out - eq <= 2 && eq - q_out <= 2, $sformatf("Q sample %0d vs %0d", q_out, eq));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
