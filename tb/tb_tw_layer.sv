// tb_tw_layer -- a 6-input, 5-neuron layer with its own encoders: random
// activities and weights, one window per trial, every neuron's activity
// compared with the clipped sum of rounded products. Inputs change between
// windows, so the encoders must restart on every window.
module tb_tw_layer;
  import tw_pkg::*;
  import tw_ref_pkg::*;

  localparam int unsigned FAN_IN = 6, N_NEU = 5;

  logic clk = 0, rst_n = 0, en = 0, first = 0, last = 0;
  tunit_t t = '0;
  tw_num_t [FAN_IN-1:0] x;
  tw_num_t [N_NEU-1:0][FAN_IN-1:0] w;
  tw_num_t [N_NEU-1:0] y;
  int checks = 0, failures = 0;

  tw_layer #(.FAN_IN(FAN_IN), .N_NEU(N_NEU)) dut (.clk, .rst_n, .en, .first, .last, .t,
                                                  .x, .w, .y);

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

  initial begin
    tw_num_t exp_y [N_NEU];
    x = '0; w = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 300; trial++) begin
      for (int i = 0; i < FAN_IN; i++) x[i] = rand_num(WIN_LEN);
      for (int n = 0; n < N_NEU; n++) begin
        automatic int pot = 0;
        for (int i = 0; i < FAN_IN; i++) begin
          w[n][i] = rand_num(WIN_LEN);
          pot += sprod(x[i], w[n][i]);
        end
        exp_y[n] = sat(pot);
      end
      // Stop a window early now and then: the next one must start clean.
      if (trial % 7 == 3) begin
        for (int tt = 0; tt < 6; tt++) begin
          en = 1; t = tunit_t'(tt); first = (tt == 0); last = 0;
          @(negedge clk);
        end
      end
      for (int tt = 0; tt < int'(WIN_LEN); tt++) begin
        en = 1; t = tunit_t'(tt);
        first = (tt == 0); last = (tt == int'(WIN_LEN) - 1);
        @(negedge clk);
      end
      en = 0; first = 0; last = 0; t = '0;
      #1;
      for (int n = 0; n < N_NEU; n++)
        check(y[n] == exp_y[n], $sformatf("trial %0d neuron %0d y=%0s%0d exp=%0s%0d", trial, n,
                                          y[n].s ? "-" : "+", y[n].m,
                                          exp_y[n].s ? "-" : "+", exp_y[n].m));
      if (trial % 4 == 0) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
