// mac_processor: lower-MAC engine between the PHY and the main CPU.
//
// Receive: at the SFD interrupt it opens the receive buffer (bytes 0..127
// of the shared memory) and writes every PSDU octet the PHY delivers into
// it, keeping its own copy of the first three octets (frame control and
// sequence number). At the end of the packet it raises rx_avail (with
// rx_len and rx_fcs_ok, and an irq_rx pulse) for the CPU; with fcs_filter
// set it does so only when the FCS is correct. The buffer stays the CPU's
// until rx_release; a frame arriving before that is dropped and counted.
// If the frame asks for an acknowledgement (frame-control bit 5, and it is
// not itself an ACK) and auto_ack is on, it sends the ACK: PSDU length 5,
// i.e. frame control 0x0002 and the received sequence number, with the PHY
// appending the FCS, after ack_delay clocks and without channel sensing.
//
// Transmit: on tx_req the CPU's frame of tx_len octets (including FCS) is
// taken from the transmit buffer (bytes 128..255). With cca_en set the
// channel is first accessed by unslotted CSMA/CA: a random backoff of
// 0..2^BE-1 units of UNIT_CYCLES, then a clear channel assessment over two
// CCA blocks; a busy channel raises BE (MIN_BE..MAX_BE) and retries, and
// after MAX_BACKOFFS busy assessments tx_fail pulses. With cca_en clear the
// frame is started at once. Octets are handed out whenever the PHY asks
// for one; tx_done (or ack_sent) pulses when the transmit chain is idle
// again, tx_fail instead when the framer refused the frame's length.
// Frames from the MAC only go out while the PHY's origin-of-data switch
// selects the MAC.
//
// Duplex: with full_duplex clear (the standard) rx_en is low while the MAC
// transmits and a transmission waits until the receiver is not locked on a
// frame. With full_duplex set the receiver stays on and both run at once.
// The document describes a small programmable processor; this module is a
// fixed state machine that performs the tasks listed for it. Memory
// layout, backoff constants (taken from 802.15.4) and the drop rule are
// this design's own choices. The memory port is shared: a receive write
// has priority over a transmit read in the same clock.
module mac_processor #(
  parameter int UNIT_CYCLES  = 5120,  // 20 symbols at 16 Msample/s
  parameter int MIN_BE       = 3,
  parameter int MAX_BE       = 5,
  parameter int MAX_BACKOFFS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        cca_en,
  input  logic        full_duplex,
  input  logic        auto_ack,
  input  logic        fcs_filter,
  input  logic [15:0] ack_delay,
  // CPU side
  input  logic        cpu_tx_req,
  input  logic [6:0]  cpu_tx_len,
  input  logic        cpu_rx_release,
  output logic        rx_avail,
  output logic [6:0]  rx_len,
  output logic        rx_fcs_ok,
  output logic        irq_rx,
  output logic        tx_done,
  output logic        tx_fail,
  output logic        ack_sent,
  output logic [15:0] rx_dropped,
  output logic [15:0] busy_cca,
  // PHY receive side
  input  logic        phy_sfd,
  input  logic        phy_rx_busy,
  input  logic [7:0]  phy_rx_data,
  input  logic        phy_rx_valid,
  input  logic        phy_rx_done,
  input  logic        phy_rx_fcs_ok,
  output logic        rx_en,
  // CCA
  input  logic        cca_valid,
  input  logic        cca_clear,
  // PHY transmit side
  output logic        phy_tx_start,
  output logic [6:0]  phy_tx_len,
  output logic [7:0]  phy_tx_data,
  output logic        phy_tx_valid,
  input  logic        phy_tx_ready,
  input  logic        phy_tx_busy,
  input  logic        phy_tx_err,     // framer refused the length
  // shared memory port
  output logic        mem_we,
  output logic [7:0]  mem_addr,
  output logic [7:0]  mem_wdata,
  input  logic [7:0]  mem_rdata
);
  localparam logic [7:0] TX_BASE = 8'h80;

  // ---------------- receive ----------------
  logic       rx_open, rx_skip;
  logic [6:0] wptr;
  logic [7:0] hdr [3];
  logic       ack_pend;
  logic [7:0] ack_seq;
  logic       rx_we;

  assign rx_we = rx_open && !rx_skip && phy_rx_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_open <= 1'b0; rx_skip <= 1'b0; wptr <= '0;
      hdr[0] <= '0; hdr[1] <= '0; hdr[2] <= '0;
      rx_avail <= 1'b0; rx_len <= '0; rx_fcs_ok <= 1'b0; irq_rx <= 1'b0;
      rx_dropped <= '0;
    end else begin
      irq_rx <= 1'b0;
      if (cpu_rx_release) rx_avail <= 1'b0;
      if (phy_sfd) begin
        rx_open <= 1'b1;
        rx_skip <= rx_avail && !cpu_rx_release;
        wptr    <= '0;
      end else if (rx_open) begin
        if (rx_we) begin
          wptr <= wptr + 7'd1;
          if (wptr < 7'd3) hdr[wptr[1:0]] <= phy_rx_data;
        end
        if (phy_rx_done) begin
          rx_open <= 1'b0;
          if (rx_skip) rx_dropped <= rx_dropped + 16'd1;
          else if (!fcs_filter || phy_rx_fcs_ok) begin
            rx_avail  <= 1'b1;
            rx_len    <= wptr + 7'd1;
            rx_fcs_ok <= phy_rx_fcs_ok;
            irq_rx    <= 1'b1;
          end
        end else if (!phy_rx_busy) begin
          rx_open <= 1'b0;               // frame cut off
        end
      end
    end
  end

  // ACK decision: the frame is complete and correct and asks for an ACK
  logic ack_now;
  assign ack_now = rx_open && !rx_skip && phy_rx_done && phy_rx_fcs_ok && auto_ack &&
                   (wptr >= 7'd4) && hdr[0][5] && (hdr[0][2:0] != 3'b010);

  // ---------------- transmit ----------------
  typedef enum logic [2:0] {T_IDLE, T_WAIT, T_BACKOFF, T_CCA, T_START, T_SEND, T_END} tst_t;
  tst_t        st;
  logic        is_ack, req_pend;
  logic [6:0]  req_len;
  logic [6:0]  idx;
  logic [23:0] cnt;
  logic [2:0]  nb;
  logic [2:0]  be;
  logic [1:0]  cval;
  logic [15:0] lfsr;
  logic        rd_ok;
  logic        hs;
  logic        sending;
  logic [4:0]  rnd;

  assign hs      = phy_tx_valid && phy_tx_ready;
  assign sending = (st == T_SEND) || (st == T_END);
  assign rnd = lfsr[4:0] & 5'((1 << be) - 1);

  always_comb begin
    phy_tx_start = (st == T_START) && !phy_tx_busy && (full_duplex || !phy_rx_busy);
    phy_tx_len   = is_ack ? 7'd5 : req_len;
    phy_tx_valid = 1'b0;
    phy_tx_data  = mem_rdata;
    if (sending) begin
      if (is_ack) begin
        phy_tx_valid = 1'b1;
        case (idx)
          7'd0:    phy_tx_data = 8'h02;
          7'd1:    phy_tx_data = 8'h00;
          default: phy_tx_data = ack_seq;
        endcase
      end else begin
        phy_tx_valid = rd_ok;
      end
    end
    rx_en     = full_duplex || !(sending || phy_tx_start);
    mem_we    = rx_we;
    mem_addr  = rx_we ? {1'b0, wptr} : TX_BASE + {1'b0, idx};
    mem_wdata = phy_rx_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= T_IDLE; is_ack <= 1'b0; req_pend <= 1'b0; req_len <= '0;
      idx <= '0; cnt <= '0; nb <= '0; be <= 3'(MIN_BE); cval <= '0;
      lfsr <= 16'hACE1; rd_ok <= 1'b0;
      ack_pend <= 1'b0; ack_seq <= '0;
      tx_done <= 1'b0; tx_fail <= 1'b0; ack_sent <= 1'b0; busy_cca <= '0;
    end else begin
      tx_done <= 1'b0; tx_fail <= 1'b0; ack_sent <= 1'b0;
      lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
      if (cpu_tx_req) begin
        req_pend <= 1'b1;
        req_len  <= cpu_tx_len;
      end
      if (ack_now) begin
        ack_pend <= 1'b1;
        ack_seq  <= hdr[2];
      end
      rd_ok <= sending && !rx_we && !hs;
      case (st)
        T_IDLE:
          if (ack_pend) begin
            ack_pend <= 1'b0;
            is_ack   <= 1'b1;
            cnt      <= 24'(ack_delay);
            st       <= T_WAIT;
          end else if (req_pend) begin
            is_ack <= 1'b0;
            if (cca_en) begin
              nb  <= '0;
              be  <= 3'(MIN_BE);
              cnt <= 24'(lfsr[4:0] & 5'((1 << MIN_BE) - 1)) * 24'(UNIT_CYCLES);
              st  <= T_BACKOFF;
            end else begin
              st <= T_START;
            end
          end
        T_WAIT:
          if (cnt == '0) st <= T_START;
          else cnt <= cnt - 24'd1;
        T_BACKOFF:
          if (cnt == '0) begin
            cval <= '0;
            st   <= T_CCA;
          end else cnt <= cnt - 24'd1;
        T_CCA:
          if (cca_valid) begin
            if (cval == 2'd1) begin
              if (cca_clear) st <= T_START;
              else begin
                busy_cca <= busy_cca + 16'd1;
                if (nb == 3'(MAX_BACKOFFS - 1)) begin
                  tx_fail  <= 1'b1;
                  req_pend <= 1'b0;
                  st       <= T_IDLE;
                end else begin
                  nb  <= nb + 3'd1;
                  be  <= (be == 3'(MAX_BE)) ? be : be + 3'd1;
                  cnt <= 24'(rnd) * 24'(UNIT_CYCLES);
                  st  <= T_BACKOFF;
                end
              end
            end else cval <= cval + 2'd1;
          end
        T_START:
          if (phy_tx_start) begin
            idx <= '0;
            st  <= T_SEND;
          end
        T_SEND: begin
          if (hs) idx <= idx + 7'd1;
          if (phy_tx_busy) st <= T_END;
        end
        T_END: begin
          if (hs) idx <= idx + 7'd1;
          if (!phy_tx_busy) begin
            st <= T_IDLE;
            if (is_ack) ack_sent <= 1'b1;
            else begin
              tx_done  <= !phy_tx_err;
              tx_fail  <= phy_tx_err;
              req_pend <= cpu_tx_req;
            end
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end

endmodule
