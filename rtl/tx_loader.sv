// tx_loader: "load packet data from memory" stage of the transmitter.
//
// Selects where the PSDU comes from (the origin-of-data parameter): the
// host TX FIFO or the MAC processor. The host stream carries a packet as one
// length word (PSDU length including FCS, in bits 6:0) followed by the
// payload bytes; the MAC raises mac_start (held until the chain turns busy) with the length and then
// delivers bytes on request. The loader hands the length to the framer with
// f_start and then forwards the bytes of the selected source with a
// valid/ready handshake. A new packet is only taken when the transmit chain
// reports idle (tx_busy low); the source is sampled at that moment. The
// host framing word is this design's own choice.
module tx_loader (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       src_sel,      // 0 host FIFO, 1 MAC processor
  input  logic       tx_busy,      // framer / modulator still working
  // host TX FIFO
  input  logic       host_valid,
  output logic       host_ready,
  input  logic [8:0] host_data,
  // MAC processor
  input  logic       mac_start,
  input  logic [6:0] mac_len,
  input  logic       mac_valid,
  output logic       mac_ready,
  input  logic [7:0] mac_data,
  // framer
  output logic       f_start,
  output logic [6:0] f_len,
  output logic       f_valid,
  input  logic       f_ready,
  output logic [7:0] f_data,
  input  logic       f_done        // framer finished taking bytes
);

  typedef enum logic [1:0] {IDLE, WAIT_BUSY, STREAM} st_t;
  st_t  st;
  logic src;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= IDLE;
      src     <= 1'b0;
      f_start <= 1'b0;
      f_len   <= '0;
    end else begin
      f_start <= 1'b0;
      case (st)
        IDLE:
          if (!tx_busy) begin
            if (!src_sel && host_valid) begin
              src     <= 1'b0;
              f_len   <= host_data[6:0];
              f_start <= 1'b1;
              st      <= WAIT_BUSY;
            end else if (src_sel && mac_start) begin
              src     <= 1'b1;
              f_len   <= mac_len;
              f_start <= 1'b1;
              st      <= WAIT_BUSY;
            end
          end
        WAIT_BUSY: st <= STREAM;     // framer sees f_start this cycle
        STREAM:    if (f_done) st <= IDLE;
        default:   st <= IDLE;
      endcase
    end
  end

  always_comb begin
    host_ready = 1'b0;
    mac_ready  = 1'b0;
    f_valid    = 1'b0;
    f_data     = '0;
    if (st == IDLE) begin
      // consume the host length word as the packet is started
      host_ready = !tx_busy && !src_sel;
    end else if (st == STREAM) begin
      if (src) begin
        f_valid   = mac_valid;
        f_data    = mac_data;
        mac_ready = f_ready;
      end else begin
        f_valid    = host_valid;
        f_data     = host_data[7:0];
        host_ready = f_ready;
      end
    end
  end

endmodule
