// rx_writer: "write packet to memory" stage of the receiver.
//
// Delivers received PSDU octets to the destinations chosen at run time:
// bit 0 of dst sends them to the host RX FIFO, bit 1 to the MAC processor;
// both may be set. Towards the host every octet becomes a 9-bit word with
// bit 8 clear, and after the last octet one status word follows with bit 8
// set, bit 0 = FCS correct and bits 7:1 zero (this framing is this design's
// own). Octets arrive far apart (64 chip periods), so the status word is
// simply pushed one clock after the last octet. When the host FIFO is full
// the word is lost and overflow counts it. The MAC side gets the octets,
// the first/last marks and the end-of-packet status unchanged.
module rx_writer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] dst,
  input  logic [7:0] byte_data,
  input  logic       byte_valid,
  input  logic       first,
  input  logic       last,
  input  logic       done,
  input  logic       fcs_ok,
  // host RX FIFO
  output logic       host_valid,
  input  logic       host_ready,
  output logic [8:0] host_data,
  output logic [15:0] overflow,
  // MAC processor
  output logic [7:0] mac_data,
  output logic       mac_valid,
  output logic       mac_first,
  output logic       mac_last,
  output logic       mac_done,
  output logic       mac_fcs_ok
);
  logic pend, pend_ok;

  always_comb begin
    host_valid = 1'b0;
    host_data  = '0;
    if (pend) begin
      host_valid = 1'b1;
      host_data  = {1'b1, 7'd0, pend_ok};
    end else if (byte_valid && dst[0]) begin
      host_valid = 1'b1;
      host_data  = {1'b0, byte_data};
    end
    mac_data   = byte_data;
    mac_valid  = byte_valid && dst[1];
    mac_first  = first && dst[1];
    mac_last   = last && dst[1];
    mac_done   = done && dst[1];
    mac_fcs_ok = fcs_ok;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend <= 1'b0; pend_ok <= 1'b0; overflow <= '0;
    end else begin
      if (host_valid && !host_ready) overflow <= overflow + 16'd1;
      if (pend) pend <= 1'b0;
      if (done && dst[0]) begin
        pend    <= 1'b1;
        pend_ok <= fcs_ok;
      end
    end
  end

endmodule
