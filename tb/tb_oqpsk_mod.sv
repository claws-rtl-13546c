`timescale 1ns/1ps
// tb_oqpsk_mod: chip timing of the modulator. With offset, one chip is
// taken every OSR clocks, even chips start I pulses and odd chips start Q
// pulses one chip period later, each pulse lasting 2*OSR samples. Without
// offset, I and Q pulses start together every 2*OSR samples.
// Stimulus and sizes are this testbench's own; the expected branch timing is worked out here from the chip index, not taken
// from the RTL.
module tb_oqpsk_mod;
  localparam int OSR = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic offset_en = 1, chip, chip_valid, chip_ready;
  logic i_act, i_bit, q_act, q_bit, busy;
  logic [3:0] i_ph, q_ph;
  int checks = 0, failures = 0;
  logic chips[$];
  int cyc = 0;
  int take_t[$], i_start_t[$], q_start_t[$];
  logic i_bits[$], q_bits[$];

  oqpsk_mod #(.OSR(OSR)) dut (.*);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // drive the chip stream away from the sampling edge
  always @(negedge clk) begin
    chip_valid = chips.size() > 0;
    chip = chips.size() > 0 ? chips[0] : 1'b0;
  end
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (chip_valid && chip_ready) begin take_t.push_back(cyc); void'(chips.pop_front()); end
    if (i_act && i_ph == 0) begin i_start_t.push_back(cyc); i_bits.push_back(i_bit); end
    if (q_act && q_ph == 0) begin q_start_t.push_back(cyc); q_bits.push_back(q_bit); end
    if (i_act) check(i_ph < 2 * OSR, "I phase in range");
  end

  task automatic run(input bit off, input string tag);
    logic ref_c[$];
    for (int k = 0; k < 64; k++) ref_c.push_back(1'($urandom));
    take_t.delete(); i_start_t.delete(); q_start_t.delete(); i_bits.delete(); q_bits.delete();
    offset_en = off;
    @(negedge clk); chips = ref_c;
    @(negedge clk);
    while (busy) @(negedge clk);
    check(take_t.size() == 64, {tag, ": all chips taken"});
    for (int k = 1; k < take_t.size(); k++)
      check(take_t[k] - take_t[k-1] == OSR, {tag, ": one chip per OSR clocks"});
    check(i_start_t.size() == 32 && q_start_t.size() == 32, $sformatf("%s: 32 pulses per branch (%0d, %0d)", tag, i_start_t.size(), q_start_t.size()));
    for (int k = 0; k < 32 && k < i_start_t.size() && k < q_start_t.size(); k++) begin
      check(i_bits[k] == ref_c[2*k] && q_bits[k] == ref_c[2*k+1], {tag, ": even chips on I, odd on Q"});
      check(q_start_t[k] - i_start_t[k] == (off ? OSR : 0), {tag, ": Q offset"});
      if (k > 0) check(i_start_t[k] - i_start_t[k-1] == 2 * OSR, {tag, ": pulse period 2*OSR"});
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run(1, "O-QPSK");
    run(0, "QPSK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
