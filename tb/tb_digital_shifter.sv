`timescale 1ns/1ps
// tb_digital_shifter: a constant or rotating input is mixed with the NCO;
// output compared with the exact complex product computed in real
// arithmetic (two clocks of latency), for positive and negative shifts and
// a change of frequency on the fly.
// Stimulus and sizes are this testbench's own; the expected rotation is computed here in real arithmetic, not taken
// from the RTL.
module tb_digital_shifter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] fcw = 0;
  logic signed [15:0] in_i = 0, in_q = 0, out_i, out_q;
  int checks = 0, failures = 0;
  real ph_ref = 0.0;
  real hist_i[$], hist_q[$], hist_p[$];
  int maxerr = 0;

  digital_shifter #(.PHASE_W(32), .LUT_BITS(10)) dut (.*);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      real ei, eq, p;
      // input: a slowly rotating tone of amplitude 12000
      in_i = 16'($rtoi(12000.0 * $cos(0.01 * n)));
      in_q = 16'($rtoi(12000.0 * $sin(0.01 * n)));
      if (n == 1000) fcw = 32'h5000_0000;          // +5/16 fs
      if (n == 2000) fcw = 32'hE000_0000;          // -1/8 fs
      hist_i.push_back(real'(in_i)); hist_q.push_back(real'(in_q)); hist_p.push_back(ph_ref);
      ph_ref += 2.0 * 3.14159265358979 * real'($signed(fcw)) / 4294967296.0;
      @(negedge clk);
      if (n >= 1) begin
        p  = hist_p[0];
        ei = hist_i[0] * $cos(p) - hist_q[0] * $sin(p);
        eq = hist_i[0] * $sin(p) + hist_q[0] * $cos(p);
        void'(hist_i.pop_front()); void'(hist_q.pop_front()); void'(hist_p.pop_front());
        // 10-bit phase table: error up to about 12000 * 2*pi/1024
        check((real'(out_i) - ei) < 90.0 && (ei - real'(out_i)) < 90.0 &&
              (real'(out_q) - eq) < 90.0 && (eq - real'(out_q)) < 90.0,
              $sformatf("n=%0d out (%0d,%0d) expected (%f,%f)", n, out_i, out_q, ei, eq));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
