// oqpsk_mod: "perform O-QPSK modulation" stage.
//
// Takes one chip every OSR samples (one chip period Tc) and assigns chips
// alternately to the in-phase (even chips) and quadrature (odd chips)
// branches. Every chip starts a pulse of 2*Tc = 2*OSR samples on its
// branch, so with offset_en set the Q branch lags the I branch by one Tc:
// offset QPSK as in 802.15.4. With offset_en clear (the alternative
// modulation type) an even chip is held back one Tc and both branches start
// together: plain QPSK. Per sample it outputs, for each branch, whether a
// pulse is running, its chip value and the sample index inside the pulse;
// pulse_shaper turns these into waveform samples. The first chip is taken
// as soon as one is offered; when no chip is offered at a chip instant the
// running pulses are finished and the modulator goes idle. busy is high
// while any pulse runs. Output registered, one sample per clock.
module oqpsk_mod #(
  parameter int OSR = 8               // samples per chip period Tc
) (
  input  logic clk,
  input  logic rst_n,
  input  logic offset_en,
  input  logic chip,
  input  logic chip_valid,
  output logic chip_ready,
  output logic i_act,
  output logic i_bit,
  output logic [$clog2(2*OSR)-1:0] i_ph,
  output logic q_act,
  output logic q_bit,
  output logic [$clog2(2*OSR)-1:0] q_ph,
  output logic busy
);
  localparam int PW = $clog2(2*OSR);
  localparam int SW = $clog2(OSR) > 0 ? $clog2(OSR) : 1;

  logic          run;          // chip instants are being counted
  logic [SW-1:0] s;            // sample inside the chip period
  logic          odd;          // next chip goes to Q
  logic          hold_i, hold_v;
  logic          slot;

  assign slot       = !run || (s == SW'(OSR - 1));
  assign chip_ready = slot;
  assign busy       = run || i_act || q_act;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; s <= '0; odd <= 1'b0;
      i_act <= 1'b0; i_bit <= 1'b0; i_ph <= '0;
      q_act <= 1'b0; q_bit <= 1'b0; q_ph <= '0;
      hold_i <= 1'b0; hold_v <= 1'b0;
    end else begin
      // advance running pulses
      if (i_act) begin
        i_ph <= i_ph + 1'b1;
        if (i_ph == PW'(2*OSR - 1)) i_act <= 1'b0;
      end
      if (q_act) begin
        q_ph <= q_ph + 1'b1;
        if (q_ph == PW'(2*OSR - 1)) q_act <= 1'b0;
      end
      if (run) s <= (s == SW'(OSR - 1)) ? '0 : s + 1'b1;

      if (slot) begin
        if (chip_valid) begin
          run <= 1'b1;
          odd <= !odd;
          if (!odd) begin
            if (offset_en) begin
              i_act <= 1'b1; i_bit <= chip; i_ph <= '0;
            end else begin
              hold_i <= chip; hold_v <= 1'b1;
            end
          end else begin
            q_act <= 1'b1; q_bit <= chip; q_ph <= '0;
            if (hold_v) begin
              i_act <= 1'b1; i_bit <= hold_i; i_ph <= '0; hold_v <= 1'b0;
            end
          end
        end else begin
          run    <= 1'b0;
          s      <= '0;
          odd    <= 1'b0;
          hold_v <= 1'b0;
        end
      end
    end
  end

endmodule
