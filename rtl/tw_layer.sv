// tw_layer -- one fully connected layer of the time-window network.
//
// The layer's FAN_IN input activities are each turned into a symmetric pulse
// train by one sym_encoder; every pulse train fans out to all N_NEU neurons,
// where it meets that neuron's weight through an AND gate (tw_synapse). So a
// layer needs FAN_IN encoders and N_NEU*FAN_IN synapses, and evaluates all of
// its neurons in parallel in one time window of WIN_LEN clock cycles. The
// number of layers and of neurons per layer is free in the described
// architecture; the sharing of encoders across neurons is this design's choice.
//
// Interface and timing: `x` must be stable while `en` is high. `first`/`last`
// mark the window's first and last time units (they come from tw_timebase and
// are shared with the other layers). `y` is registered at the end of the
// window and held until the layer runs again.
module tw_layer
  import tw_pkg::*;
#(
  parameter int unsigned FAN_IN = 20,  // inputs of the layer
  parameter int unsigned N_NEU  = 20   // neurons of the layer
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,     // this layer's window is running
  input  logic                        first,  // first time unit of a window
  input  logic                        last,   // last time unit of a window
  input  tunit_t                      t,      // current time unit
  input  tw_num_t [FAN_IN-1:0]        x,      // input activities
  input  tw_num_t [N_NEU-1:0][FAN_IN-1:0] w,  // w[n][i]: input i -> neuron n
  output tw_num_t [N_NEU-1:0]         y       // output activities
);

  logic [FAN_IN-1:0] x_pulse, x_sign;

  for (genvar i = 0; i < FAN_IN; i++) begin : g_enc
    sym_encoder u_enc (
      .clk  (clk),
      .rst_n(rst_n),
      .first(first),
      .mag  (x[i].m),
      .pulse(x_pulse[i])
    );
    assign x_sign[i] = x[i].s;
  end

  for (genvar n = 0; n < N_NEU; n++) begin : g_neu
    tw_neuron #(.FAN_IN(FAN_IN)) u_neu (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (en),
      .first  (first),
      .last   (last),
      .t      (t),
      .x_pulse(x_pulse),
      .x_sign (x_sign),
      .w      (w[n]),
      .y      (y[n])
    );
  end

endmodule
