// tb_sym_encoder -- checks the symmetric pulse encoder over every magnitude:
// the pulse count per window, the running count against round(t*b/15),
// mirror symmetry about the window centre, the coincidence count against a
// from-the-start code of every length, and that back-to-back windows restart
// cleanly (each magnitude is encoded twice in a row, in two passes).
module tb_sym_encoder;
  import tw_pkg::*;
  import tw_ref_pkg::*;

  logic clk = 0, rst_n = 0, first = 0;
  tw_num_t val;
  logic pulse;
  int checks = 0, failures = 0;

  sym_encoder dut (.clk, .rst_n, .first, .mag(val.m), .pulse);

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

  initial begin
    bit pat [WIN_LEN];
    int cnt;
    val = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++)
      for (int b = 0; b <= int'(WIN_LEN); b++)
        for (int s = 0; s < 2; s++) begin
          cnt = 0;
          val = '{s: 1'(s), m: mag_t'(b)};
          for (int t = 0; t < int'(WIN_LEN); t++) begin
            first = (t == 0);
            #1;
            pat[t] = pulse;
            check(pulse == sym_pulse(b, t), $sformatf("b=%0d t=%0d pulse=%0b", b, t, pulse));
            cnt += int'(pulse);
            @(negedge clk);
          end
          first = 0;
          check(cnt == b, $sformatf("b=%0d count=%0d", b, cnt));
          for (int t = 0; t < int'(WIN_LEN); t++)
            check(pat[t] == pat[WIN_LEN-1-t], $sformatf("b=%0d not symmetric at %0d", b, t));
          // Product with a run of a ones from the window start.
          for (int a = 0; a <= int'(WIN_LEN); a++) begin
            automatic int c = 0;
            for (int t = 0; t < a; t++) c += int'(pat[t]);
            check(c == rprod(a, b), $sformatf("a=%0d b=%0d product=%0d", a, b, c));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
