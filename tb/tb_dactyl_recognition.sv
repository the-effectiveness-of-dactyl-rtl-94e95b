// tb_dactyl_recognition -- recognition of all 36 characters by the full-size
// network (default parameters) with hand-built weights.
//
// Each character gets a synthetic glove gesture: 6 of the 20 inputs high
// (12..15 of 15) and the rest low (0..3), with the high sets chosen at random
// so that any two characters share at most 3 high inputs. Both hidden layers
// use identity weights (+15 on the diagonal), which pass the inputs through
// exactly, since round(15*x/15) = x. Output neuron c has weight +2 on the
// inputs high in gesture c and -2 on the others, so its potential is
// 2*(matching high inputs) - 2*(other high inputs): 12 for its own gesture and
// at most 0 for any other. Every gesture is shown 5 times with fresh noise;
// the largest of the 36 activities must be the shown character's, by a margin,
// and each result must arrive 45 cycles after start.
module tb_dactyl_recognition;
  import tw_pkg::*;

  localparam int unsigned N_IN = 20, N_H1 = 20, N_H2 = 20, N_OUT = 36, N_HIGH = 6;

  logic clk = 0, rst_n = 0, start = 0;
  tw_num_t [N_IN-1:0] x;
  tw_num_t [N_H1-1:0][N_IN-1:0] w1;
  tw_num_t [N_H2-1:0][N_H1-1:0] w2;
  tw_num_t [N_OUT-1:0][N_H2-1:0] w3;
  logic busy, done;
  tw_num_t [N_OUT-1:0] y;
  bit [N_IN-1:0] gesture [N_OUT];
  int checks = 0, failures = 0, recognised = 0;

  dactyl_nn dut (.clk, .rst_n, .start, .x, .w1, .w2, .w3, .busy, .done, .y);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int value(tw_num_t v);
    return v.s ? -int'(v.m) : int'(v.m);
  endfunction

  initial begin
    // Pick 36 gestures with pairwise overlap of at most 3 high inputs.
    automatic int n = 0;
    while (n < int'(N_OUT)) begin
      automatic bit [N_IN-1:0] g = '0;
      automatic bit ok = 1;
      while ($countones(g) < int'(N_HIGH)) g[$urandom_range(0, N_IN - 1)] = 1'b1;
      for (int k = 0; k < n; k++) if ($countones(g & gesture[k]) > 3) ok = 0;
      if (ok) begin gesture[n] = g; n++; end
    end
    for (int a = 0; a < int'(N_H1); a++)
      for (int b = 0; b < int'(N_IN); b++)
        w1[a][b] = '{s: 1'b0, m: (a == b) ? mag_t'(WIN_LEN) : '0};
    for (int a = 0; a < int'(N_H2); a++)
      for (int b = 0; b < int'(N_H1); b++)
        w2[a][b] = '{s: 1'b0, m: (a == b) ? mag_t'(WIN_LEN) : '0};
    for (int c = 0; c < int'(N_OUT); c++)
      for (int i = 0; i < int'(N_H2); i++)
        w3[c][i] = '{s: !gesture[c][i], m: mag_t'(2)};
    x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int rep = 0; rep < 5; rep++)
      for (int c = 0; c < int'(N_OUT); c++) begin
        automatic int cyc = 0, best = 0, second = -100;
        for (int i = 0; i < int'(N_IN); i++)
          x[i] = '{s: 1'b0, m: gesture[c][i] ? mag_t'($urandom_range(12, 15))
                                              : mag_t'($urandom_range(0, 3))};
        start = 1;
        @(posedge clk); #1;
        start = 0;
        while (!done && cyc < 200) begin
          @(posedge clk); #1;
          cyc++;
        end
        check(cyc == 45, $sformatf("character %0d: latency %0d cycles", c, cyc));
        for (int k = 1; k < int'(N_OUT); k++)
          if (value(y[k]) > value(y[best])) best = k;
        for (int k = 0; k < int'(N_OUT); k++)
          if (k != best && value(y[k]) > second) second = value(y[k]);
        check(best == c, $sformatf("character %0d recognised as %0d", c, best));
        check(value(y[c]) == 12, $sformatf("character %0d: own activity %0d, expected 12",
                                           c, value(y[c])));
        check(second <= 0, $sformatf("character %0d: runner-up activity %0d", c, second));
        if (best == c) recognised++;
      end
    $display("recognised %0d of %0d presentations", recognised, 5 * N_OUT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
