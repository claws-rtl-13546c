// msk_demod: MSK demodulator with CFO and sampling-clock compensation.
//
// O-QPSK with half-sine pulses is MSK: during every chip period the phase
// turns by +/-90 degrees at a constant rate. The demodulator therefore
// works on the phase step between consecutive samples. The input is first
// smoothed by a moving average over OSR/2 samples (a simple channel filter:
// flat enough over the MSK main lobe, a quarter of the white noise power,
// about 13 dB down at 5 MHz from the carrier at the default 16 Msample/s);
// of the average the top 8 bits are used. On those,
// disc[n] = Im(x[n] * conj(x[n-1])) = Q[n]I[n-1] - I[n]Q[n-1]. A carrier frequency offset adds a constant
// to disc; it is removed by subtracting a slow running mean of disc
// (time constant 2^CFO_SH samples). The corrected values are summed over a
// sliding window of OSR samples, one chip period. Chip timing (and its drift
// from a sampling clock offset) is tracked by keeping, for each of the OSR
// sampling phases, a running mean of |window sum|. While acquiring, the
// sampling phase jumps to the strongest phase when that beats it by 1/2;
// after that it only moves one step to a neighbour that beats it by 1/8,
// so tracking never jumps by half a chip. At that phase one hard chip is emitted: 1 for a counter-clockwise
// step. A chip is never emitted within OSR/2 clocks of the previous one, so
// a move of the sampling phase cannot emit a chip twice and shift the
// symbol boundaries. The chip stream is the MSK form of the chip sequences, which
// chip_correlator expects. The filter and all three algorithms are this
// design's own simple choices. Chips are emitted only while en is high;
// latency from the input sample to chip_valid is four clocks.
module msk_demod #(
  parameter int OSR    = 8,
  parameter int CFO_SH = 9,
  parameter int TIM_SH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic signed [15:0] in_i,
  input  logic signed [15:0] in_q,
  output logic chip,
  output logic chip_valid
);
  localparam int PW = $clog2(OSR) > 0 ? $clog2(OSR) : 1;
  localparam int SW = 17 + $clog2(OSR) + 1;   // window sum width
  localparam int EW = SW + TIM_SH;           // timing energy width
  localparam int MA = (OSR >= 2) ? OSR / 2 : 1;  // moving-average length
  localparam int MW = 16 + $clog2(MA);           // moving-sum width

  logic signed [7:0]        xi, xq, xi_d, xq_d;
  logic signed [16:0]       disc, disc_n;
  logic signed [16+CFO_SH:0] dc_acc;
  logic signed [16:0]       dc_est, y;
  logic signed [16:0]       win [OSR];
  logic signed [SW-1:0]     sum;
  logic [SW-1:0]            mag;
  logic [EW-1:0]            en_ph [OSR];
  logic [PW-1:0]            p, best, cand, nxt, prv, top;
  logic signed [15:0]       hi [MA];             // last MA inputs, I
  logic signed [15:0]       hq [MA];             // last MA inputs, Q
  logic signed [MW-1:0]     ma_i, ma_q;          // moving sums
  logic [PW:0]              since;               // clocks since the last chip
  logic                     emit;

  always_comb begin
    xi     = ma_i[MW-1 -: 8];
    xq     = ma_q[MW-1 -: 8];
    disc_n = xq * xi_d - xi * xq_d;
    dc_est = 17'(dc_acc >>> CFO_SH);
    y      = disc - dc_est;
    mag    = sum[SW-1] ? SW'(-sum) : SW'(sum);
    emit   = (p == best) && (since >= (PW+1)'(MA - 1));
    nxt    = (best == PW'(OSR - 1)) ? '0 : best + 1'b1;
    prv    = (best == '0) ? PW'(OSR - 1) : best - 1'b1;
    cand   = (en_ph[nxt] > en_ph[prv]) ? nxt : prv;
    top    = '0;
    for (int k = 1; k < OSR; k++)
      if (en_ph[k] > en_ph[top]) top = PW'(k);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xi_d <= '0; xq_d <= '0; disc <= '0; dc_acc <= '0;
      ma_i <= '0; ma_q <= '0;
      for (int k = 0; k < MA; k++) begin hi[k] <= '0; hq[k] <= '0; end
      for (int k = 0; k < OSR; k++) begin win[k] <= '0; en_ph[k] <= '0; end
      sum <= '0; p <= '0; best <= '0; since <= '0;
      chip <= 1'b0; chip_valid <= 1'b0;
    end else begin
      // stage 0: moving average
      hi[0] <= in_i;
      hq[0] <= in_q;
      for (int k = 1; k < MA; k++) begin hi[k] <= hi[k-1]; hq[k] <= hq[k-1]; end
      ma_i <= ma_i + MW'(in_i) - MW'(hi[MA-1]);
      ma_q <= ma_q + MW'(in_q) - MW'(hq[MA-1]);
      // stage 1: phase discriminator
      xi_d <= xi;
      xq_d <= xq;
      disc <= disc_n;
      // stage 2: CFO removal and one-chip sliding sum
      dc_acc <= dc_acc + (17+CFO_SH)'(disc) - (17+CFO_SH)'(dc_acc >>> CFO_SH);
      win[0] <= y;
      for (int k = 1; k < OSR; k++) win[k] <= win[k-1];
      sum <= sum + SW'(y) - SW'(win[OSR-1]);
      // stage 3: timing phase energy, decision
      p <= (p == PW'(OSR - 1)) ? '0 : p + 1'b1;
      en_ph[p] <= en_ph[p] + EW'(mag) - (en_ph[p] >> TIM_SH);
      if (en_ph[top] > en_ph[best] + (en_ph[best] >> 1)) best <= top;
      else if (en_ph[cand] > en_ph[best] + (en_ph[best] >> 3)) best <= cand;
      chip_valid <= en && emit;
      if (emit) since <= '0;
      else if (since != (PW+1)'(OSR)) since <= since + 1'b1;
      chip       <= (sum > 0);
    end
  end

endmodule
