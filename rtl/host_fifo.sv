// host_fifo: synchronous FIFO standing for the host DMA stream.
//
// The host feeds packets to the transmitter, and takes received packets
// from the receiver, through one FIFO per direction. Both sides use a
// valid/ready handshake; a word moves when valid and ready are high on the
// same clock edge. rd_data shows the oldest word whenever rd_valid is high
// (first-word fall-through). DEPTH words of WIDTH bits; the default 9-bit
// word carries a byte plus a marker bit whose meaning is set by the user of
// the FIFO. Depth and width are this design's own choices.
module host_fifo #(
  parameter int DEPTH = 256,
  parameter int WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic [$clog2(DEPTH):0] level
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             push, pop;

  assign wr_ready = (level != DEPTH[AW:0]);
  assign rd_valid = (level != '0);
  assign rd_data  = mem[rp];
  assign push     = wr_valid & wr_ready;
  assign pop      = rd_valid & rd_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      level <= level + {{AW{1'b0}}, push} - {{AW{1'b0}}, pop};
    end
  end

  always_ff @(posedge clk)
    if (push) mem[wp] <= wr_data;

endmodule
