// tw_neuron -- neuron of the time-window network.
//
// Multiplication and summation happen at the same time: in every time unit of
// the window each synapse (tw_synapse) delivers one product pulse with a sign,
// and the neuron adds the number of positive pulses and subtracts the number of
// negative ones in a signed up/down accumulator. After the WIN_LEN time units
// of the window the accumulator holds the potential
//     P = sum_i sign_i * round(|x_i|*|w_i| / WIN_LEN)
// in units of 1/WIN_LEN. That is the described architecture. The non-linear
// output function is not specified; this design uses symmetric saturation
// (a hard-limited linear function): the activity is P clipped to
// [-WIN_LEN, +WIN_LEN], i.e. to [-1, +1], which keeps it in the number format
// the next layer expects. There is no bias term.
//
// Interface and timing: `en` is high during the neuron's own window, `first`
// on its first time unit (the accumulator restarts), `last` on its final time
// unit. At the clock edge that ends the last time unit the activity is
// registered into `y`, which then holds until the next window of this neuron.
// `rst_n` is a synchronous active-low reset.
module tw_neuron
  import tw_pkg::*;
#(
  parameter int unsigned FAN_IN = 20   // synapses; 20 network inputs
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,                  // this neuron's window is running
  input  logic    first,               // first time unit of the window
  input  logic    last,                // last time unit of the window
  input  tunit_t  t,                   // current time unit
  input  logic    [FAN_IN-1:0] x_pulse, // symmetric-coded input pulses
  input  logic    [FAN_IN-1:0] x_sign,  // input signs
  input  tw_num_t [FAN_IN-1:0] w,       // weights
  output tw_num_t y                    // registered activity
);

  localparam int unsigned PW = pot_width(FAN_IN);
  localparam int unsigned CW = $clog2(FAN_IN + 1);

  logic [FAN_IN-1:0]  p, p_neg;
  logic signed [PW-1:0] acc_q, acc_base, pot;
  logic        [CW-1:0] n_pos, n_neg;
  tw_num_t            y_d;

  for (genvar i = 0; i < FAN_IN; i++) begin : g_syn
    tw_synapse u_syn (
      .t      (t),
      .x_pulse(x_pulse[i]),
      .x_sign (x_sign[i]),
      .w      (w[i]),
      .p      (p[i]),
      .p_neg  (p_neg[i])
    );
  end

  // Count this time unit's positive and negative product pulses.
  always_comb begin
    n_pos = '0;
    n_neg = '0;
    for (int i = 0; i < FAN_IN; i++) begin
      if (p[i] && !p_neg[i]) n_pos = n_pos + CW'(1);
      if (p[i] &&  p_neg[i]) n_neg = n_neg + CW'(1);
    end
    acc_base = first ? '0 : acc_q;
    pot      = acc_base + $signed(PW'(n_pos)) - $signed(PW'(n_neg));
  end

  // Symmetric saturation to [-WIN_LEN, +WIN_LEN].
  always_comb begin
    if (pot > $signed(PW'(WIN_LEN)))       y_d = '{s: 1'b0, m: mag_t'(WIN_LEN)};
    else if (pot < -$signed(PW'(WIN_LEN))) y_d = '{s: 1'b1, m: mag_t'(WIN_LEN)};
    else if (pot < 0)                      y_d = '{s: 1'b1, m: mag_t'(-pot)};
    else                                   y_d = '{s: 1'b0, m: mag_t'(pot)};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q <= '0;
      y     <= '0;
    end else if (en) begin
      acc_q <= pot;
      if (last) y <= y_d;
    end
  end

endmodule
