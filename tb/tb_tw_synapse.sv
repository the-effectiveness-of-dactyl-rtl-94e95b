// tb_tw_synapse -- checks the AND-gate multiplier: exhaustively per time unit
// (weight pulse = t < |w|, AND, sign XOR), and over whole windows that the
// count of product pulses with a symmetric-coded activity is round(a*b/15).
module tb_tw_synapse;
  import tw_pkg::*;
  import tw_ref_pkg::*;

  tunit_t  t;
  logic    x_pulse, x_sign, p, p_neg;
  tw_num_t w;
  int checks = 0, failures = 0;

  tw_synapse dut (.t, .x_pulse, .x_sign, .w, .p, .p_neg);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int tt = 0; tt < int'(WIN_LEN); tt++)
      for (int m = 0; m <= int'(WIN_LEN); m++)
        for (int v = 0; v < 8; v++) begin
          t = tunit_t'(tt);
          w = '{s: v[0], m: mag_t'(m)};
          x_pulse = v[1];
          x_sign  = v[2];
          #1;
          check(p == (v[1] && tt < m), $sformatf("t=%0d m=%0d v=%0d p", tt, m, v));
          check(p_neg == (v[0] ^ v[2]), $sformatf("t=%0d m=%0d v=%0d sign", tt, m, v));
        end
    // Whole-window products, equation y = a o b.
    for (int a = 0; a <= int'(WIN_LEN); a++)
      for (int b = 0; b <= int'(WIN_LEN); b++) begin
        automatic int c = 0;
        w = '{s: 1'b0, m: mag_t'(a)};
        x_sign = 1'b0;
        for (int tt = 0; tt < int'(WIN_LEN); tt++) begin
          t = tunit_t'(tt);
          x_pulse = sym_pulse(b, tt);
          #1;
          c += int'(p);
        end
        check(c == (a * b + 7) / 15, $sformatf("%0d o %0d = %0d", a, b, c));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
