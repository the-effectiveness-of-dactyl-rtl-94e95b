// tb_tw_timebase -- checks the window sequencer: done exactly 3*15 = 45 cycles
// after start, one-hot layer enables each lasting one window in order,
// first/last on time units 0 and 14, and start ignored while busy.
module tb_tw_timebase;
  import tw_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, first, last, done;
  tunit_t t;
  logic [2:0] layer_en;
  int checks = 0, failures = 0;

  tw_timebase #(.N_LAYERS(3)) dut (.clk, .rst_n, .start, .busy, .t, .first, .last,
                                   .layer_en, .done);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!busy && !done && layer_en == 0, "idle after reset");
    for (int run = 0; run < 4; run++) begin
      automatic int cyc = 0;
      start = 1;
      @(posedge clk); #1;
      start = (run == 1);   // keep start high during one run: must be ignored
      while (!done) begin
        automatic int l = cyc / int'(WIN_LEN), tt = cyc % int'(WIN_LEN);
        check(busy, $sformatf("run %0d cycle %0d busy", run, cyc));
        check(int'(t) == tt, $sformatf("run %0d cycle %0d t=%0d", run, cyc, t));
        check(layer_en == 3'(1 << l), $sformatf("run %0d cycle %0d layer_en=%b", run, cyc, layer_en));
        check(first == (tt == 0) && last == (tt == int'(WIN_LEN) - 1),
              $sformatf("run %0d cycle %0d first/last", run, cyc));
        @(posedge clk); #1;
        cyc++;
        if (cyc > 100) break;
      end
      start = 0;
      check(cyc == 3 * int'(WIN_LEN), $sformatf("run %0d took %0d cycles, expected 45", run, cyc));
      check(!busy && layer_en == 0, "idle with done");
      @(posedge clk); #1;
      check(!done, "done is one cycle");
      repeat (run) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
