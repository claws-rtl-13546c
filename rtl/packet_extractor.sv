// packet_extractor: "extract packet / verify FCS" stage.
//
// Pairs the symbols that follow the SFD into octets (low nibble first).
// The first octet is the PHR: its 7-bit frame length is checked against
// the programmable maximum (and against the two FCS octets when FCS
// checking is on); a bad length pulses len_err and drop. Otherwise the
// next `length' octets are the PSDU: each is output with byte_valid, first
// marks octet 0 and last the final one. With crc_en set the reflected CRC
// (run-time polynomial, initial value zero) runs over the whole PSDU
// including its FCS, which leaves zero for a correct frame; fcs_ok is
// reported with done in the cycle of the last octet (always 1 with crc_en
// clear). drop tells sfd_detect to search again; sof (the SFD pulse)
// restarts the stage in case an earlier packet was cut off. Outputs are registered.
//
// The run-time CRC and maximum length follow the document's receiver
// parameters; the PHR/PSDU layout and the FCS are 802.15.4; the status
// signals and their timing are this design's own.
module packet_extractor (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sof,        // SFD found: a new packet starts
  input  logic [3:0]  sym,
  input  logic        sym_valid,
  input  logic        crc_en,
  input  logic [15:0] crc_poly,
  input  logic [6:0]  max_len,
  output logic [7:0]  byte_data,
  output logic        byte_valid,
  output logic        first,
  output logic        last,
  output logic [6:0]  len,
  output logic        done,
  output logic        fcs_ok,
  output logic        len_err,
  output logic        drop,
  output logic        busy
);
  import claws_pkg::crc_byte;

  typedef enum logic [1:0] {PHR, DATA} st_t;
  st_t         st;
  logic        nib;
  logic [3:0]  lo;
  logic [6:0]  cnt;
  logic [15:0] crc, crc_n;
  logic [7:0]  b;

  always_comb begin
    b     = {sym, lo};
    crc_n = crc_byte(crc, b, crc_poly);
  end

  assign busy = (st == DATA) || nib;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= PHR; nib <= 1'b0; lo <= '0; cnt <= '0; crc <= '0; len <= '0;
      byte_data <= '0; byte_valid <= 1'b0; first <= 1'b0; last <= 1'b0;
      done <= 1'b0; fcs_ok <= 1'b0; len_err <= 1'b0; drop <= 1'b0;
    end else begin
      byte_valid <= 1'b0; done <= 1'b0; len_err <= 1'b0; drop <= 1'b0;
      first <= 1'b0; last <= 1'b0;
      if (sof) begin
        st  <= PHR;
        nib <= 1'b0;
      end else if (sym_valid) begin
        if (!nib) begin
          lo  <= sym;
          nib <= 1'b1;
        end else begin
          nib <= 1'b0;
          if (st == PHR) begin
            if (b[6:0] == 7'd0 || b[6:0] > max_len || (crc_en && b[6:0] < 7'd2)) begin
              len_err <= 1'b1;
              drop    <= 1'b1;
            end else begin
              len <= b[6:0];
              cnt <= '0;
              crc <= '0;
              st  <= DATA;
            end
          end else begin
            byte_data  <= b;
            byte_valid <= 1'b1;
            first      <= (cnt == 7'd0);
            crc        <= crc_n;
            cnt        <= cnt + 7'd1;
            if (cnt == len - 7'd1) begin
              last   <= 1'b1;
              done   <= 1'b1;
              fcs_ok <= !crc_en || (crc_n == 16'h0000);
              drop   <= 1'b1;
              st     <= PHR;
            end
          end
        end
      end
    end
  end

endmodule
