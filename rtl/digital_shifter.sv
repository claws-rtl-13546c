// digital_shifter: numerically controlled oscillator and complex mixer.
//
// Shifts a baseband stream by a programmable frequency so that the
// receiver and the transmitter can work on different 802.15.4 channels at
// the same time, without retuning the analog PLL. A PHASE_W-bit phase
// accumulator advances by fcw every sample (shift = fcw/2^PHASE_W times the
// sample rate, two's complement, so negative words shift down); its top
// LUT_BITS address cosine and sine tables computed at elaboration (amplitude
// 32767). The output is (in_i + j*in_q) * exp(j*phase), scaled back by
// 2^15. A change of fcw acts on the next sample. Latency: two clocks
// (table lookup, then multiply). The table size and latency are this
// design's own choices.
module digital_shifter #(
  parameter int PHASE_W  = 32,
  parameter int LUT_BITS = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [PHASE_W-1:0] fcw,
  input  logic signed [15:0] in_i,
  input  logic signed [15:0] in_q,
  output logic signed [15:0] out_i,
  output logic signed [15:0] out_q
);
  localparam int N = 1 << LUT_BITS;
  typedef logic signed [15:0] lut_t [N];

  function automatic lut_t mk_lut(bit is_sin);
    lut_t t;
    real a;
    for (int k = 0; k < N; k++) begin
      a = 2.0 * 3.14159265358979 * real'(k) / real'(N);
      t[k] = 16'($rtoi((is_sin ? $sin(a) : $cos(a)) * 32767.0 + (((is_sin ? $sin(a) : $cos(a)) >= 0.0) ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam lut_t COS = mk_lut(1'b0);
  localparam lut_t SIN = mk_lut(1'b1);

  logic [PHASE_W-1:0]  phase;
  logic signed [15:0]  c, s, di, dq;
  logic signed [32:0]  yi, yq;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      c <= '0; s <= '0; di <= '0; dq <= '0;
      out_i <= '0; out_q <= '0;
    end else begin
      phase <= phase + fcw;
      c  <= COS[phase[PHASE_W-1 -: LUT_BITS]];
      s  <= SIN[phase[PHASE_W-1 -: LUT_BITS]];
      di <= in_i;
      dq <= in_q;
      out_i <= 16'(yi >>> 15);
      out_q <= 16'(yq >>> 15);
    end
  end

  always_comb begin
    yi = di * c - dq * s;
    yq = di * s + dq * c;
  end

endmodule
