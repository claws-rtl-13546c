// sfd_detect: symbol synchronisation and "detect SFD" stage.
//
// Searches the correlator output, which arrives once per chip, for a
// preamble symbol (symbol 0) scoring at least SCORE_MIN of 31; that chip
// fixes the symbol boundary and from then on only every 32nd correlator
// output is looked at. After at least PRE_MIN preamble symbols it expects
// the low and then the high nibble of the programmable SFD; sfd_irq pulses
// when both are found (the interrupt that starts the MAC's receive
// routine) and the following symbols, the PHR and PSDU, are passed on one
// per out_valid. A weak symbol or an unexpected one before the SFD returns
// the search; after the SFD the detector stays locked until drop (end of
// packet or error from packet_extractor) or until en falls. Thresholds are
// this design's own choices.
module sfd_detect #(
  parameter int SCORE_MIN = 26,
  parameter int PRE_MIN   = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] sfd,
  input  logic [3:0] sym,
  input  logic [4:0] score,
  input  logic       valid,
  input  logic       drop,
  output logic       sfd_irq,
  output logic [3:0] out_sym,
  output logic       out_valid,
  output logic       locked
);
  typedef enum logic [1:0] {SEARCH, PRE, SFD_HI, DATA} st_t;
  st_t        st;
  logic [4:0] ccnt;
  logic [3:0] npre;
  logic       good, tick;

  assign good   = (score >= 5'(SCORE_MIN));
  assign tick   = valid && (ccnt == 5'd31);
  assign locked = (st != SEARCH);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= SEARCH; ccnt <= '0; npre <= '0;
      sfd_irq <= 1'b0; out_sym <= '0; out_valid <= 1'b0;
    end else begin
      sfd_irq   <= 1'b0;
      out_valid <= 1'b0;
      if (valid) ccnt <= ccnt + 5'd1;
      if (!en || drop) begin
        st <= SEARCH;
      end else begin
        case (st)
          SEARCH:
            if (valid && good && sym == 4'd0) begin
              st <= PRE; ccnt <= '0; npre <= 4'd1;
            end
          PRE:
            if (tick) begin
              if (!good) st <= SEARCH;
              else if (sym == 4'd0) begin
                if (npre != 4'hF) npre <= npre + 4'd1;
              end else if (sym == sfd[3:0] && npre >= 4'(PRE_MIN)) st <= SFD_HI;
              else st <= SEARCH;
            end
          SFD_HI:
            if (tick) begin
              if (good && sym == sfd[7:4]) begin
                st <= DATA; sfd_irq <= 1'b1;
              end else st <= SEARCH;
            end
          DATA:
            if (tick) begin
              out_sym   <= sym;
              out_valid <= 1'b1;
            end
          default: st <= SEARCH;
        endcase
      end
    end
  end

endmodule
