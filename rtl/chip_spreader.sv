// chip_spreader: "convert symbols to chipping sequences" stage.
//
// Every 4-bit symbol is replaced by its 32-chip sequence, read from a
// run-time table so that non-standard spreading codes can be used; with the
// reset table of phy_config it is the 802.15.4 mapping. Chips leave one per
// handshake, chip c0 first. A symbol is accepted (sym_ready) only while no
// sequence is being sent, so one idle cycle separates two symbols; the
// modulator asks for a chip only once every OSR cycles, so this never slows
// the stream when OSR is 3 or more.
module chip_spreader
  import claws_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  chip_tab_t chip_tab,
  input  logic [3:0] sym,
  input  logic      sym_valid,
  output logic      sym_ready,
  output logic      chip,
  output logic      chip_valid,
  input  logic      chip_ready,
  output logic      busy
);

  chip_seq_t  seq;
  logic [4:0] idx;
  logic       full;

  assign sym_ready  = !full;
  assign chip_valid = full;
  assign chip       = seq[idx];
  assign busy       = full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full <= 1'b0;
      idx  <= '0;
      seq  <= '0;
    end else if (!full) begin
      if (sym_valid) begin
        seq  <= chip_tab[sym];
        idx  <= '0;
        full <= 1'b1;
      end
    end else if (chip_ready) begin
      idx <= idx + 5'd1;
      if (idx == 5'd31) full <= 1'b0;
    end
  end

endmodule
