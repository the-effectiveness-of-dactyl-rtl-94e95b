// tw_timebase -- time-window sequencer of the network.
//
// All arithmetic of the network is done by counting pulses over time windows
// of WIN_LEN clock cycles. This controller counts the time unit t inside the
// window (0 .. WIN_LEN-1) and steps through the layers, one whole window per
// layer, layer 0 first. With the three weighted layers of a two-hidden-layer
// network a computation takes 3*WIN_LEN = 45 clock cycles, 1200.7 ns at the
// 37.477 MHz reported for this architecture: the layers follow each other
// back to back with no gap cycles. The register-level sequencing is this
// design's own.
//
// Interface and timing: a `start` pulse while idle is taken at a clock edge
// (call it edge 0); the first window begins right after it. `layer_en` is
// one-hot for the running layer; `first`/`last` mark time units 0 and
// WIN_LEN-1. After edge N_LAYERS*WIN_LEN `done` is high for one cycle and
// `busy` drops. `start` while busy is ignored. `rst_n` is a synchronous
// active-low reset.
module tw_timebase
  import tw_pkg::*;
#(
  parameter int unsigned N_LAYERS = 3   // weighted layers: 2 hidden + output
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output tunit_t              t,
  output logic                first,
  output logic                last,
  output logic [N_LAYERS-1:0] layer_en,
  output logic                done
);

  localparam int unsigned LW = (N_LAYERS > 1) ? $clog2(N_LAYERS) : 1;
  localparam tunit_t T_LAST = tunit_t'(WIN_LEN - 1);

  logic [LW-1:0] layer_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      t       <= '0;
      layer_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          t       <= '0;
          layer_q <= '0;
        end
      end else if (t == T_LAST) begin
        t <= '0;
        if (layer_q == LW'(N_LAYERS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          layer_q <= layer_q + LW'(1);
        end
      end else begin
        t <= t + tunit_t'(1);
      end
    end
  end

  always_comb begin
    first    = busy && (t == '0);
    last     = busy && (t == T_LAST);
    layer_en = '0;
    for (int l = 0; l < N_LAYERS; l++)
      if (busy && layer_q == LW'(l)) layer_en[l] = 1'b1;
  end

  a_t_range    : assert property (@(posedge clk) disable iff (!rst_n) t <= T_LAST);
  a_one_layer  : assert property (@(posedge clk) disable iff (!rst_n) busy |-> $onehot(layer_en));
  a_done_pulse : assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);

endmodule
