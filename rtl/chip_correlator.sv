// chip_correlator: "correlate to chipping sequences" stage.
//
// Keeps the last 31 demodulated chips and compares them, at every new chip,
// with the MSK form of all 16 chipping sequences (claws_pkg::msk_ref),
// derived from the same run-time table the transmitter uses, so a changed
// spreading code is followed on both sides. The first MSK chip of a symbol
// depends on the last chip of the previous symbol and is left out, so 31
// chips are compared; the score is the number that agree (0..31). It
// outputs the best symbol and its score one clock after every chip; the
// lowest symbol number wins a tie. Whether the window is aligned to a
// symbol is decided downstream by sfd_detect.
//
// A run-time chip table on both sides follows the document (its receiver
// takes the chipping sequence as a parameter); correlating in the MSK
// domain over 31 chips is this design's own choice.
module chip_correlator
  import claws_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  chip_tab_t chip_tab,
  input  logic      chip,
  input  logic      chip_valid,
  output logic [3:0] sym,
  output logic [4:0] score,
  output logic      valid
);
  logic [30:0] w, w_next;
  logic [30:0] refw [16];
  logic [4:0]  sc   [16];
  logic [3:0]  bsym;
  logic [4:0]  bsc;
  chip_seq_t   r;

  always_comb begin
    w_next = {w[29:0], chip};
    for (int s = 0; s < 16; s++) begin
      r = msk_ref(chip_tab[s]);
      for (int i = 0; i < 31; i++) refw[s][i] = r[31 - i];
      sc[s] = '0;
      for (int i = 0; i < 31; i++) sc[s] = sc[s] + {4'b0, ~(w_next[i] ^ refw[s][i])};
    end
    bsym = '0;
    bsc  = sc[0];
    for (int s = 1; s < 16; s++)
      if (sc[s] > bsc) begin bsc = sc[s]; bsym = 4'(s); end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w <= '0; sym <= '0; score <= '0; valid <= 1'b0;
    end else begin
      valid <= chip_valid;
      if (chip_valid) begin
        w     <= w_next;
        sym   <= bsym;
        score <= bsc;
      end
    end
  end

endmodule
