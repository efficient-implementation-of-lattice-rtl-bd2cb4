// tb_sk: the three DSP lanes of the SK multiplier. Each lane is fed one
// even/odd multiplicand pair and a 129-step pass over a (step 0 marked
// first, step 128 marked last), with random partial sums to add back
// (stack_en random). Step i must produce
//   (a[i]*b_e + a[i-1]*b_o + stack) mod 7681,
// with a[-1] = a[128] = 0 (first / last), two cycles after its operands and
// in order. Operands and the partial sum are driven as in the multiplier:
// the partial sum one cycle after the operands.
module tb_sk;
  import sk_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, first, last, stack_en, out_valid;
  coef_t a_low, a_high, a_mid, inStack_l, inStack_h, inStack_m, ab_low, ab_high, ab_mid;
  bcoef_t b_lowE, b_highE, b_midE, b_lowO, b_highO, b_midO;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sk dut (.*);

  int unsigned av [3][129];
  int unsigned bev [3], bov [3];
  int unsigned st [3][129];
  bit          sten [129];
  int unsigned expq [$];
  int cyc = 0, issue_cyc [$];

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && out_valid) begin
    int unsigned e;
    int ic;
    ic = issue_cyc.pop_front();
    checks++;
    if (cyc - ic != 2) begin failures++; $display("FAIL latency %0d", cyc - ic); end
    e = expq.pop_front(); checks++; if (ab_low  !== coef_t'(e)) begin failures++; if (failures < 10) $display("FAIL low");  end
    e = expq.pop_front(); checks++; if (ab_high !== coef_t'(e)) begin failures++; if (failures < 10) $display("FAIL high"); end
    e = expq.pop_front(); checks++; if (ab_mid  !== coef_t'(e)) begin failures++; if (failures < 10) $display("FAIL mid");  end
  end

  task automatic pass(int mode);
    for (int l = 0; l < 3; l++) begin
      bev[l] = (mode == 0) ? 62 : $urandom_range(62);
      bov[l] = (mode == 0) ? 62 : $urandom_range(62);
      for (int i = 0; i < 129; i++) begin
        av[l][i] = (i == 128) ? 0 : (mode == 0) ? 7680 : $urandom_range(7680);
        st[l][i] = (mode == 0) ? 7680 : $urandom_range(7680);
      end
    end
    for (int i = 0; i < 129; i++) begin
      sten[i] = (mode == 0) ? 1'b1 : ($urandom_range(1) == 1);
      for (int l = 0; l < 3; l++)
        expq.push_back((av[l][i] * bev[l] + ((i == 0) ? 0 : av[l][i-1] * bov[l]) + (sten[i] ? st[l][i] : 0)) % Q);
    end
    for (int i = 0; i <= 129; i++) begin
      @(negedge clk);
      in_valid = (i < 129); first = (i == 0); last = (i == 128);
      stack_en = (i < 129) ? sten[i] : 1'b0;
      if (i < 129) begin
        issue_cyc.push_back(cyc);
        a_low = coef_t'(av[0][i]); a_high = coef_t'(av[1][i]); a_mid = coef_t'(av[2][i]);
        if (i == 128) begin a_low = coef_t'($urandom); a_high = coef_t'($urandom); a_mid = coef_t'($urandom); end
      end
      b_lowE = bcoef_t'(bev[0]); b_highE = bcoef_t'(bev[1]); b_midE = bcoef_t'(bev[2]);
      b_lowO = bcoef_t'(bov[0]); b_highO = bcoef_t'(bov[1]); b_midO = bcoef_t'(bov[2]);
      if (i > 0) begin
        inStack_l = coef_t'(st[0][i-1]); inStack_h = coef_t'(st[1][i-1]); inStack_m = coef_t'(st[2][i-1]);
      end
    end
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; first = 0; last = 0; stack_en = 0;
    a_low = 0; a_high = 0; a_mid = 0; inStack_l = 0; inStack_h = 0; inStack_m = 0;
    b_lowE = 0; b_highE = 0; b_midE = 0; b_lowO = 0; b_highO = 0; b_midO = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    pass(0);
    for (int p = 0; p < 5; p++) pass(1);
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d results missing", expq.size() / 3); end
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
