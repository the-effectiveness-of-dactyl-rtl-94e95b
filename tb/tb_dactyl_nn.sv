// tb_dactyl_nn -- end-to-end test of the full-size network (20 inputs, two
// hidden layers of 20, 36 outputs, every parameter at its default). Random
// inputs and weights; a reference model evaluates the three layers with the
// rounded-product arithmetic and checks all 36 outputs and the latency of
// exactly 45 clock cycles from start to done. Also counts how often each
// mechanism happened: positive and negative saturation, negative products,
// negative inputs, a start ignored while busy, back-to-back runs, and inputs
// changing during a run (which must not matter: they are captured at start).
module tb_dactyl_nn;
  import tw_pkg::*;
  import tw_ref_pkg::*;

  localparam int unsigned N_IN = 20, N_H1 = 20, N_H2 = 20, N_OUT = 36;

  logic clk = 0, rst_n = 0, start = 0;
  tw_num_t [N_IN-1:0] x;
  tw_num_t [N_H1-1:0][N_IN-1:0] w1;
  tw_num_t [N_H2-1:0][N_H1-1:0] w2;
  tw_num_t [N_OUT-1:0][N_H2-1:0] w3;
  logic busy, done;
  tw_num_t [N_OUT-1:0] y;
  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_neg_prod = 0, n_neg_in = 0, n_ignored = 0,
      n_b2b = 0, n_xchange = 0;

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One layer of the reference model; counts the mechanisms it sees.
  function automatic void ref_layer(input tw_num_t xin [], input tw_num_t wl [][],
                                    output tw_num_t yout []);
    yout = new[wl.size()];
    foreach (wl[n]) begin
      automatic int pot = 0;
      foreach (xin[i]) begin
        automatic int p = sprod(xin[i], wl[n][i]);
        if (p < 0) n_neg_prod++;
        pot += p;
      end
      if (pot > int'(WIN_LEN)) n_sat_hi++;
      if (pot < -int'(WIN_LEN)) n_sat_lo++;
      yout[n] = sat(pot);
    end
  endfunction

  initial begin
    tw_num_t xr [], h1 [], h2 [], yr [];
    tw_num_t wr1 [][], wr2 [][], wr3 [][];
    x = '0; w1 = '0; w2 = '0; w3 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int run = 0; run < 40; run++) begin
      automatic int cyc = 0;
      // Weight and input ranges vary so that layers see both small and
      // saturating potentials.
      automatic int lim = (run % 4 == 0) ? int'(WIN_LEN) : 4 + run % 8;
      xr = new[N_IN];
      wr1 = new[N_H1]; wr2 = new[N_H2]; wr3 = new[N_OUT];
      for (int i = 0; i < N_IN; i++) begin
        xr[i] = rand_num(WIN_LEN);
        if (run % 3 != 2) xr[i].s = 1'b0;   // glove readings are non-negative
        if (xr[i].s && xr[i].m != 0) n_neg_in++;
        x[i] = xr[i];
      end
      for (int n = 0; n < N_H1; n++) begin
        wr1[n] = new[N_IN];
        for (int i = 0; i < N_IN; i++) begin wr1[n][i] = rand_num(lim); w1[n][i] = wr1[n][i]; end
      end
      for (int n = 0; n < N_H2; n++) begin
        wr2[n] = new[N_H1];
        for (int i = 0; i < N_H1; i++) begin wr2[n][i] = rand_num(lim); w2[n][i] = wr2[n][i]; end
      end
      for (int n = 0; n < N_OUT; n++) begin
        wr3[n] = new[N_H2];
        for (int i = 0; i < N_H2; i++) begin wr3[n][i] = rand_num(lim); w3[n][i] = wr3[n][i]; end
      end
      ref_layer(xr, wr1, h1);
      ref_layer(h1, wr2, h2);
      ref_layer(h2, wr3, yr);

      start = 1;
      @(posedge clk); #1;
      start = 0;
      while (!done && cyc < 200) begin
        // Disturb the inputs and pulse start mid-run: both must be ignored.
        if (cyc == 7 && run % 2 == 1) begin
          for (int i = 0; i < N_IN; i++) x[i] = rand_num(WIN_LEN);
          n_xchange++;
        end
        if (cyc == 20 && run % 2 == 0) begin start = 1; n_ignored++; end
        else start = 0;
        @(posedge clk); #1;
        cyc++;
      end
      start = 0;
      check(cyc == 45, $sformatf("run %0d: latency %0d cycles, expected 45", run, cyc));
      for (int n = 0; n < N_OUT; n++)
        check(y[n] == yr[n], $sformatf("run %0d output %0d: %0s%0d expected %0s%0d", run, n,
                                       y[n].s ? "-" : "+", y[n].m, yr[n].s ? "-" : "+", yr[n].m));
      // Outputs hold after done.
      @(posedge clk); #1;
      for (int n = 0; n < N_OUT; n++)
        check(y[n] == yr[n], $sformatf("run %0d output %0d did not hold", run, n));
      if (run % 5 == 0) begin repeat (4) @(posedge clk); #1; end
      else n_b2b++;
    end
    $display("mechanisms: saturation high %0d, low %0d, negative products %0d, negative inputs %0d,",
             n_sat_hi, n_sat_lo, n_neg_prod, n_neg_in);
    $display("            start ignored while busy %0d, inputs changed mid-run %0d, quick restarts %0d",
             n_ignored, n_xchange, n_b2b);
    check(n_sat_hi > 0, "positive saturation never happened");
    check(n_sat_lo > 0, "negative saturation never happened");
    check(n_neg_prod > 0, "no negative product");
    check(n_neg_in > 0, "no negative input");
    check(n_ignored > 0, "start while busy never tried");
    check(n_xchange > 0, "inputs never changed mid-run");
    check(n_b2b > 0, "no quick restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
