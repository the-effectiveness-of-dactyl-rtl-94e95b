// dactyl_nn -- feed-forward network for Dactyl finger-alphabet recognition,
// built from AND-gate time-window neurons.
//
// Twenty inputs (14 bend/abduction sensors of a data glove plus 6 values for
// the wrist position) pass two hidden layers to 36 outputs, one per character
// of the alphabet. Every layer is a tw_layer: its inputs are pulse-encoded by
// sym_encoder units and multiplied by the weights with single AND gates while
// each neuron counts the coincident pulses, so a whole layer is evaluated in
// one time window of WIN_LEN = 15 clock cycles. tw_timebase runs the three
// weighted layers one window after another. The topology (20 inputs, two
// hidden layers, 36 outputs) and the one-window-per-layer timing follow the
// described network; the hidden-layer sizes (20 each by default) are free
// parameters of that network and were chosen here. The trained weights are
// inputs of this module: tie them to constants to obtain a fixed network.
//
// Interface and timing: `x` is captured on the clock edge that takes `start`
// (while idle). `done` rises 3*WIN_LEN = 45 clock cycles later, together with
// valid outputs `y`, which hold until the next computation ends. Weights must
// be stable while `busy` is high. Numbers are sign-magnitude, magnitude k
// meaning k/15. `rst_n` is a synchronous active-low reset.
module dactyl_nn
  import tw_pkg::*;
#(
  parameter int unsigned N_IN  = 20,   // glove sensors (14) + wrist position (6)
  parameter int unsigned N_H1  = 20,   // first hidden layer
  parameter int unsigned N_H2  = 20,   // second hidden layer
  parameter int unsigned N_OUT = 36    // characters of the alphabet
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  tw_num_t [N_IN-1:0]             x,
  input  tw_num_t [N_H1-1:0][N_IN-1:0]   w1,
  input  tw_num_t [N_H2-1:0][N_H1-1:0]   w2,
  input  tw_num_t [N_OUT-1:0][N_H2-1:0]  w3,
  output logic                           busy,
  output logic                           done,
  output tw_num_t [N_OUT-1:0]            y
);

  tunit_t          t;
  logic            first, last;
  logic [2:0]      layer_en;
  tw_num_t [N_IN-1:0] x_q;
  tw_num_t [N_H1-1:0] h1;
  tw_num_t [N_H2-1:0] h2;

  tw_timebase #(.N_LAYERS(3)) u_tb (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .busy    (busy),
    .t       (t),
    .first   (first),
    .last    (last),
    .layer_en(layer_en),
    .done    (done)
  );

  // Input register: the inputs are sampled when a computation starts.
  always_ff @(posedge clk) begin
    if (!rst_n)              x_q <= '0;
    else if (start && !busy) x_q <= x;
  end

  tw_layer #(.FAN_IN(N_IN), .N_NEU(N_H1)) u_l1 (
    .clk(clk), .rst_n(rst_n), .en(layer_en[0]), .first(first), .last(last),
    .t(t), .x(x_q), .w(w1), .y(h1)
  );

  tw_layer #(.FAN_IN(N_H1), .N_NEU(N_H2)) u_l2 (
    .clk(clk), .rst_n(rst_n), .en(layer_en[1]), .first(first), .last(last),
    .t(t), .x(h1), .w(w2), .y(h2)
  );

  tw_layer #(.FAN_IN(N_H2), .N_NEU(N_OUT)) u_l3 (
    .clk(clk), .rst_n(rst_n), .en(layer_en[2]), .first(first), .last(last),
    .t(t), .x(h2), .w(w3), .y(y)
  );

endmodule
