// shared_mem: dual-port byte memory shared by the MAC processor and the
// main CPU.
//
// Both ports can read and write any byte; reads return the data one clock
// after the address (read-before-write on the same port). When both ports
// write the same address in one clock, port A (the MAC) wins. The MAC
// uses the lower half as receive buffer and the upper half as transmit
// buffer (see mac_processor). Its size, 256 bytes, is this design's own
// choice: two buffers of 128 bytes, enough for the largest 802.15.4 PSDU.
module shared_mem #(
  parameter int BYTES = 256
) (
  input  logic       clk,
  input  logic       a_we,
  input  logic [$clog2(BYTES)-1:0] a_addr,
  input  logic [7:0] a_wdata,
  output logic [7:0] a_rdata,
  input  logic       b_we,
  input  logic [$clog2(BYTES)-1:0] b_addr,
  input  logic [7:0] b_wdata,
  output logic [7:0] b_rdata
);
  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
