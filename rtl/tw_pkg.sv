// tw_pkg -- number format and constants shared by the time-window neural network.
//
// Every value that travels through the network (an input, a weight, a neuron
// activity) is a sign-magnitude number. Its NBITS-bit magnitude k stands for the
// fraction k/WIN_LEN of the closed interval <0;1>, with WIN_LEN = 2^NBITS - 1
// (k = 5 is 5/15 for 4-bit numbers). A product of two such numbers is formed
// by counting coincident pulses over a "time window" of WIN_LEN clock cycles,
// so the window length equals the largest magnitude. The 4-bit format and the
// window length follow the described architecture; the saturating activation
// function below is this design's choice, since the non-linear function of the
// neuron is not specified.
package tw_pkg;

  // Magnitude width of every number (inputs, weights, activities).
  localparam int unsigned NBITS = 4;
  // Time window length in clock cycles: the largest magnitude, 2^NBITS - 1.
  localparam int unsigned WIN_LEN = (1 << NBITS) - 1;
  // Width of the time-unit counter inside a window.
  localparam int unsigned TW = $clog2(WIN_LEN);

  typedef logic [NBITS-1:0] mag_t;
  typedef logic [TW-1:0]    tunit_t;

  // Sign-magnitude number: s = 1 means negative.
  typedef struct packed {
    logic s;
    mag_t m;
  } tw_num_t;

  // Width of a signed neuron potential for FAN_IN synapses: each synapse adds
  // at most WIN_LEN in magnitude over a window.
  function automatic int unsigned pot_width(int unsigned fan_in);
    return $clog2(fan_in * WIN_LEN + 1) + 1;
  endfunction

endpackage
