// tx_framer: "create packet / add FCS" stage of the transmitter.
//
// Builds the 802.15.4 PPDU and emits it as 4-bit symbols, low nibble of
// every octet first: PREAMBLE_SYMS zero symbols, the two SFD symbols, the
// PHR (7-bit frame length, reserved bit 0), the PSDU bytes taken from the
// byte stream, and, when crc_en is set, the two FCS octets (low octet
// first). The length given with start is the PSDU length including the FCS,
// so len-2 payload bytes are pulled when crc_en is set. SFD, FCS on/off, the
// CRC polynomial and the maximum length are run-time inputs, as the
// extended parameter set asks. The CRC is a reflected 16-bit LFSR, bit 0
// of each octet first, starting at zero (0x8408 gives the standard ITU-T
// FCS). A length of zero, shorter than the FCS, or above max_len is refused
// with an err_len pulse and nothing is sent (this rule is this design's own).
// Symbols leave with a valid/ready handshake; byte_done pulses when the last
// payload byte has been taken and busy is high from start to the last symbol.
module tx_framer #(
  parameter int PREAMBLE_SYMS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [6:0]  len,
  input  logic        crc_en,
  input  logic [15:0] crc_poly,
  input  logic [7:0]  sfd,
  input  logic [6:0]  max_len,
  input  logic        byte_valid,
  output logic        byte_ready,
  input  logic [7:0]  byte_data,
  output logic [3:0]  sym,
  output logic        sym_valid,
  input  logic        sym_ready,
  output logic        busy,
  output logic        byte_done,
  output logic        err_len
);
  import claws_pkg::crc_byte;

  typedef enum logic [2:0] {IDLE, PRE, SFD, PHR, DATA, FCS} st_t;
  st_t         st;
  logic [6:0]  idx;        // octet index inside the current field
  logic [6:0]  plen;       // PSDU length
  logic [6:0]  nbytes;     // payload bytes to pull
  logic        fcs_on;
  logic        nib;        // 0: low nibble next, 1: high nibble next
  logic [3:0]  hi;
  logic [15:0] crc;
  logic [7:0]  bval;
  logic        bok;
  logic        last_of_field;
  logic        len_bad;

  always_comb begin
    bval = '0;
    bok  = 1'b1;
    last_of_field = 1'b0;
    case (st)
      PRE:  begin bval = 8'h00; last_of_field = (idx == 7'(PREAMBLE_SYMS/2 - 1)); end
      SFD:  begin bval = sfd;   last_of_field = 1'b1; end
      PHR:  begin bval = {1'b0, plen}; last_of_field = 1'b1; end
      DATA: begin bval = byte_data; bok = byte_valid; last_of_field = (idx == nbytes - 7'd1); end
      FCS:  begin bval = idx[0] ? crc[15:8] : crc[7:0]; last_of_field = idx[0]; end
      default: bok = 1'b0;
    endcase
    sym        = nib ? hi : bval[3:0];
    sym_valid  = (st != IDLE) && (nib || bok);
    byte_ready = (st == DATA) && !nib && sym_ready;
    busy       = (st != IDLE) || start;
    len_bad    = (len == 7'd0) || (crc_en && len < 7'd2) || (len > max_len);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= IDLE;
      idx       <= '0;
      plen      <= '0;
      nbytes    <= '0;
      fcs_on    <= 1'b0;
      nib       <= 1'b0;
      hi        <= '0;
      crc       <= '0;
      err_len   <= 1'b0;
      byte_done <= 1'b0;
    end else begin
      err_len   <= 1'b0;
      byte_done <= 1'b0;
      if (st == IDLE) begin
        if (start) begin
          if (len_bad) begin
            err_len   <= 1'b1;
            byte_done <= 1'b1;
          end else begin
            st     <= PRE;
            idx    <= '0;
            nib    <= 1'b0;
            plen   <= len;
            fcs_on <= crc_en;
            nbytes <= crc_en ? len - 7'd2 : len;
            crc    <= '0;
          end
        end
      end else if (sym_valid && sym_ready) begin
        if (!nib) begin
          hi  <= bval[7:4];
          nib <= 1'b1;
          if (st == DATA) crc <= crc_byte(crc, bval, crc_poly);
        end else begin
          nib <= 1'b0;
          idx <= idx + 7'd1;
          if (last_of_field) begin
            idx <= '0;
            case (st)
              PRE: st <= SFD;
              SFD: st <= PHR;
              PHR: if (nbytes != 0) st <= DATA;
                   else begin st <= fcs_on ? FCS : IDLE; byte_done <= 1'b1; end
              DATA: begin st <= fcs_on ? FCS : IDLE; byte_done <= 1'b1; end
              default: st <= IDLE;
            endcase
          end
        end
      end
    end
  end

endmodule
