// pulse_shaper: "perform pulse shaping" stage.
//
// Turns the branch states of oqpsk_mod into 16-bit I and Q samples. Each
// pulse spans 2*OSR samples; with shape_sel clear it is the 802.15.4
// half-sine, sin(pi*(k+0.5)/(2*OSR)) for sample k, so that the envelope of
// O-QPSK is constant; with shape_sel set it is rectangular (a second shape
// of this design's own choosing). The chip value gives the sign. The
// amplitude is multiplied by gain/128, a linear transmit power control;
// the pulse peak is half of full scale so gains up to 255 cannot overflow.
// The shape table is computed when the design is elaborated. One register
// stage: outputs follow the inputs by one clock.
module pulse_shaper #(
  parameter int OSR = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shape_sel,
  input  logic [7:0] gain,
  input  logic i_act,
  input  logic i_bit,
  input  logic [$clog2(2*OSR)-1:0] i_ph,
  input  logic q_act,
  input  logic q_bit,
  input  logic [$clog2(2*OSR)-1:0] q_ph,
  output logic signed [15:0] i_out,
  output logic signed [15:0] q_out
);
  localparam int N    = 2 * OSR;
  localparam int PEAK = 16383;
  typedef logic [14:0] tab_t [N];

  function automatic tab_t half_sine();
    tab_t t;
    for (int k = 0; k < N; k++)
      t[k] = 15'($rtoi(real'(PEAK) * $sin(3.14159265358979 * (real'(k) + 0.5) / real'(N)) + 0.5));
    return t;
  endfunction

  localparam tab_t HS = half_sine();

  function automatic logic signed [15:0] sample(logic act, logic b, logic [$clog2(2*OSR)-1:0] ph,
                                                logic shp, logic [7:0] g);
    logic [22:0] mag;
    logic [15:0] m;
    mag = 23'(shp ? 15'(PEAK) : HS[ph]) * 23'(g);
    m   = {1'b0, mag[21:7]};
    if (!act)    return '0;
    else if (b)  return  signed'(m);
    else         return -signed'(m);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_out <= '0;
      q_out <= '0;
    end else begin
      i_out <= sample(i_act, i_bit, i_ph, shape_sel, gain);
      q_out <= sample(q_act, q_bit, q_ph, shape_sel, gain);
    end
  end

endmodule
