// tb_ks_acc_bank: random clear / add1 / add2 traffic on the 16 accumulator
// sets against a model (sums mod 2^13); an update must be visible one cycle
// later, clear must win over the adds.
module tb_ks_acc_bank;
  import ks_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, add1, add2;
  subpoly_t delta1 [NACC];
  subpoly_t delta2 [NACC];
  subpoly_t acc [NACC];
  int unsigned model [NACC][SUBN];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ks_acc_bank dut (.*);

  initial begin
    clear = 0; add1 = 0; add2 = 0;
    for (int t = 0; t < NACC; t++) begin delta1[t] = '0; delta2[t] = '0; end
    for (int t = 0; t < NACC; t++) for (int i = 0; i < SUBN; i++) model[t][i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int t = 0; t < NACC; t++)
        for (int i = 0; i < SUBN; i++) begin
          checks++;
          if (acc[t][i] !== coef_t'(model[t][i])) begin
            failures++;
            if (failures < 10) $display("FAIL acc_%0d[%0d] step %0d", t, i, n);
          end
        end
      clear = ($urandom_range(40) == 0);
      add1 = ($urandom_range(3) != 0);
      add2 = ($urandom_range(3) != 0);
      for (int t = 0; t < NACC; t++)
        for (int i = 0; i < SUBN; i++) begin
          delta1[t][i] = coef_t'($urandom_range(8191));
          delta2[t][i] = coef_t'($urandom_range(8191));
          if (clear) model[t][i] = 0;
          else model[t][i] = (model[t][i] + (add1 ? delta1[t][i] : 0) + (add2 ? delta2[t][i] : 0)) % 8192;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
