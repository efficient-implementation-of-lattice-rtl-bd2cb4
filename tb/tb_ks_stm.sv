// tb_ks_stm: exhaustive check of one STM (signed-multiplicand) unit over both
// multiplicands in [-5, 5] (121 pairs) for a set of multipliers including
// 0, 1 and 8191; the result must be mlier * (v1 + v2) mod 2^13.
// Purely combinational unit, so no cycle count applies.
module tb_ks_stm;
  import ks_pkg::*;
  coef_t mlier, mres;
  bcoef_t mcand1, mcand2;
  int checks = 0, failures = 0;

  ks_stm dut (.*);

  function automatic bcoef_t enc(int v);
    return (v < 0) ? bcoef_t'({1'b1, 3'(-v)}) : bcoef_t'({1'b0, 3'(v)});
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) begin
      int unsigned m;
      m = (t == 0) ? 0 : (t == 1) ? 1 : (t == 2) ? 8191 : $urandom_range(8191);
      for (int v1 = -5; v1 <= 5; v1++)
        for (int v2 = -5; v2 <= 5; v2++) begin
          mlier = coef_t'(m); mcand1 = enc(v1); mcand2 = enc(v2);
          #1;
          checks++;
          if (mres !== coef_t'(longint'(m) * (v1 + v2))) begin
            failures++;
            if (failures < 10) $display("FAIL %0d*(%0d + %0d) = %0d", m, v1, v2, mres);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
