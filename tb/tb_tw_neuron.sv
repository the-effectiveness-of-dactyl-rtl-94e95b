// tb_tw_neuron -- drives a 20-input neuron with symmetric-coded random inputs
// and random weights for many windows, and compares the registered activity
// with the clipped signed sum of rounded products. Also checks that the
// activity holds outside the neuron's window and that back-to-back windows
// restart the accumulator. Counts windows that saturated high and low.
module tb_tw_neuron;
  import tw_pkg::*;
  import tw_ref_pkg::*;

  localparam int unsigned FAN_IN = 20;

  logic clk = 0, rst_n = 0, en = 0, first = 0, last = 0;
  tunit_t t = '0;
  logic [FAN_IN-1:0] x_pulse, x_sign;
  tw_num_t [FAN_IN-1:0] w;
  tw_num_t y;
  tw_num_t xv [FAN_IN];
  int checks = 0, failures = 0, n_sat_hi = 0, n_sat_lo = 0, n_mid = 0;

  tw_neuron #(.FAN_IN(FAN_IN)) dut (.clk, .rst_n, .en, .first, .last, .t,
                                    .x_pulse, .x_sign, .w, .y);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive the symmetric pulse trains of xv for time unit tt.
  always_comb
    for (int i = 0; i < FAN_IN; i++) begin
      x_pulse[i] = en && sym_pulse(int'(xv[i].m), int'(t));
      x_sign[i]  = xv[i].s;
    end

  initial begin
    int pot;
    tw_num_t exp_y;
    for (int i = 0; i < FAN_IN; i++) xv[i] = '0;
    w = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int trial = 0; trial < 400; trial++) begin
      // Small magnitudes on some trials so that not every window saturates.
      automatic int lim = (trial % 3 == 0) ? int'(WIN_LEN) : 5;
      pot = 0;
      for (int i = 0; i < FAN_IN; i++) begin
        xv[i] = rand_num(lim);
        w[i]  = rand_num(lim);
        if (trial % 5 == 1) begin xv[i].s = 1'b0; w[i].s = 1'b0; end
        if (trial % 5 == 2) begin xv[i].s = 1'b1; w[i].s = 1'b0; end
        pot += sprod(xv[i], w[i]);
      end
      exp_y = sat(pot);
      if (pot > int'(WIN_LEN)) n_sat_hi++;
      else if (pot < -int'(WIN_LEN)) n_sat_lo++;
      else n_mid++;
      for (int tt = 0; tt < int'(WIN_LEN); tt++) begin
        en = 1; t = tunit_t'(tt);
        first = (tt == 0); last = (tt == int'(WIN_LEN) - 1);
        @(negedge clk);
      end
      // Idle gap on odd trials: y must hold while en is low.
      en = 0; first = 0; last = 0; t = '0;
      #1;
      check(y == exp_y, $sformatf("trial %0d pot=%0d y=%0s%0d exp=%0s%0d", trial, pot,
                                  y.s ? "-" : "+", y.m, exp_y.s ? "-" : "+", exp_y.m));
      if (trial % 2 == 1) begin
        repeat (3) @(negedge clk);
        #1;
        check(y == exp_y, $sformatf("trial %0d y did not hold", trial));
      end
    end
    check(n_sat_hi > 0, "positive saturation never exercised");
    check(n_sat_lo > 0, "negative saturation never exercised");
    check(n_mid > 0, "unsaturated potential never exercised");
    $display("windows: saturated high %0d, low %0d, in range %0d", n_sat_hi, n_sat_lo, n_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
