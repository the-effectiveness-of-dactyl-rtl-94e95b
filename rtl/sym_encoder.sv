// sym_encoder -- encodes a number as pulses spread symmetrically around the
// centre of the time window.
//
// Of the two operands of the AND-gate multiplication, one is encoded as a run
// of ones from the start of the window and the other one symmetrically around
// the window's centre. This module produces the second kind. For magnitude b
// it emits b pulses in the WIN_LEN time units of a window, placed so that the
// number of pulses before time unit t is C(t) = round(t*b/WIN_LEN). Because
// t*b/WIN_LEN never ends in exactly .5, C(WIN_LEN-t) = b - C(t): the pattern
// is mirror-symmetric about the centre. ANDed with a run of a ones from the
// window start, it yields exactly C(a) = round(a*b/WIN_LEN) coincidences, the
// rounded product. The symmetric placement is from the described architecture;
// the exact pulse positions (this rounding rule) are this design's choice.
//
// Implementation: a Bresenham-style accumulator in units of 1/(2*WIN_LEN). It
// starts at WIN_LEN (one half) on the first time unit and adds 2*b each unit;
// when the sum reaches 2*WIN_LEN a pulse is emitted and 2*WIN_LEN subtracted.
//
// Interface: `first` marks time unit 0 of a window; `mag` must be stable for
// the whole window. `pulse` is combinational for the current time unit. The
// accumulator register updates on every clock (synchronous reset). The sign
// of the number does not pass through the encoder: it travels beside the
// pulse train unchanged.
module sym_encoder
  import tw_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    first,   // current time unit is the first of a window
  input  mag_t    mag,     // magnitude to encode, held during the window
  output logic    pulse    // encoded magnitude for the current time unit
);

  localparam int unsigned AW = $clog2(4 * WIN_LEN);
  localparam logic [AW-1:0] HALF = AW'(WIN_LEN);
  localparam logic [AW-1:0] FULL = AW'(2 * WIN_LEN);

  logic [AW-1:0] acc_q, acc_cur, sum;

  always_comb begin
    acc_cur = first ? HALF : acc_q;
    sum     = acc_cur + {mag, 1'b0};
    pulse   = (sum >= FULL);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) acc_q <= HALF;
    else        acc_q <= pulse ? sum - FULL : sum;
  end

  // The accumulator stays below one full step between time units.
  a_acc_range : assert property (@(posedge clk) disable iff (!rst_n) acc_q < FULL);

endmodule
