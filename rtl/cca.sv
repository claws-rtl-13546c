// cca: received signal strength and clear channel assessment.
//
// Averages the instantaneous energy I^2+Q^2 of the baseband samples over
// blocks of 2^WIN_LOG2 samples and reports the mean as rssi at the end of
// every block (valid pulses for one clock). The channel is reported clear
// while the last rssi is below the programmable threshold, which may take
// any value. The default block of 2048 samples is eight 802.15.4 symbol
// periods at the default 16 Msample/s, the sensing time of the standard;
// the block averaging itself is this design's own choice. After reset rssi
// is zero and clear is high until the first block ends.
module cca #(
  parameter int WIN_LOG2 = 11
) (
  input  logic clk,
  input  logic rst_n,
  input  logic signed [15:0] in_i,
  input  logic signed [15:0] in_q,
  input  logic [31:0] thresh,
  output logic [31:0] rssi,
  output logic        valid,
  output logic        clear
);
  logic [WIN_LOG2-1:0]  cnt;
  logic [31+WIN_LOG2:0] acc;
  logic [31:0]          e;
  logic signed [31:0]   wi, wq;
  logic [31+WIN_LOG2:0] sum;

  always_comb begin
    wi  = 32'(in_i);
    wq  = 32'(in_q);
    e   = 32'(wi * wi) + 32'(wq * wq);
    sum = acc + (32+WIN_LOG2)'(e);
  end

  assign clear = (rssi < thresh);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt   <= '0;
      acc   <= '0;
      rssi  <= '0;
      valid <= 1'b0;
    end else begin
      cnt   <= cnt + 1'b1;
      valid <= 1'b0;
      if (cnt == '1) begin
        rssi  <= 32'(sum >> WIN_LOG2);
        valid <= 1'b1;
        acc   <= '0;
      end else begin
        acc   <= sum;
      end
    end
  end

endmodule
