// tw_synapse -- one AND-gate multiplier of the time-window neuron.
//
// The weight is encoded from the beginning of the window: its pulse is 1 in
// time units 0 .. |w|-1 and 0 afterwards (a comparator against the shared
// time-unit counter). The incoming activity arrives already encoded
// symmetrically around the window centre (see sym_encoder). A single 2-input
// AND gate of the two pulse trains gives the product spread over the window:
// the number of ones over the window is round(|x|*|w|/WIN_LEN). The sign of
// the product is the XOR of the two signs. All of this follows the described
// multiplication; which operand gets which encoding is this design's choice
// (the activity uses the symmetric code so one encoder per activity can feed
// every neuron of the next layer, while each weight only needs a compare).
//
// Interface: purely combinational, valid for the current time unit `t`.
module tw_synapse
  import tw_pkg::*;
(
  input  tunit_t  t,        // time unit inside the window, 0 .. WIN_LEN-1
  input  logic    x_pulse,  // symmetric-coded activity pulse
  input  logic    x_sign,   // activity sign
  input  tw_num_t w,        // weight, sign-magnitude
  output logic    p,        // product pulse for this time unit
  output logic    p_neg     // product sign (1 = negative)
);

  logic w_pulse;

  always_comb begin
    w_pulse = (NBITS'(t) < w.m);   // encoding from the start of the window
    p       = x_pulse & w_pulse;   // the AND-gate multiplication
    p_neg   = x_sign ^ w.s;        // sign of the product
  end

endmodule
