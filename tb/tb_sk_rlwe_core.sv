// tb_sk_rlwe_core: end-to-end check of the SK R-LWE multiplier. Random a
// (coefficients < 7681) and b (coefficients < 32), plus the extreme vector
// a = 7680, b = 31 everywhere; all 256 result coefficients are compared with
// a schoolbook negacyclic product mod 7681 computed here. The cycle count is
// checked against the 8787 cycles reported for the design (must not exceed).
module tb_sk_rlwe_core;
  import sk_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic a_we, b_we, start, busy, done, res_re;
  logic [7:0] a_addr, b_addr, res_addr;
  coef_t a_wdata, res_rdata;
  bcoef_t b_wdata;
  logic [15:0] cycles;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sk_rlwe_core dut (.*);

  int unsigned a [N];
  int unsigned b [N];
  int unsigned ref_c [N];

  task automatic reference();
    longint acc [N];
    for (int k = 0; k < N; k++) acc[k] = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (i + j < N) acc[i+j] += longint'(a[i]) * b[j];
        else           acc[i+j-N] -= longint'(a[i]) * b[j];
    for (int k = 0; k < N; k++) ref_c[k] = 32'(((acc[k] % longint'(Q)) + longint'(Q)) % longint'(Q));
  endtask

  task automatic run(int mode);
    for (int i = 0; i < N; i++) begin
      if (mode == 1) begin a[i] = Q - 1; b[i] = 31; end
      else begin a[i] = $urandom_range(Q - 1); b[i] = $urandom_range(31); end
    end
    reference();
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      a_we = 1'b1; a_addr = 8'(i); a_wdata = coef_t'(a[i]);
      b_we = 1'b1; b_addr = 8'(i); b_wdata = bcoef_t'(b[i]);
    end
    @(negedge clk);
    a_we = 1'b0; b_we = 1'b0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    $display("SK multiplication: %0d cycles", cycles);
    checks++;
    if (cycles > 16'd8787) begin failures++; $display("FAIL: more than 8787 cycles"); end
    for (int i = 0; i < N; i++) begin
      res_re = 1'b1; res_addr = 8'(i);
      @(negedge clk);
      res_re = 1'b0;
      checks++;
      if (res_rdata !== coef_t'(ref_c[i])) begin
        failures++;
        if (failures < 10) $display("FAIL c[%0d] = %0d, expected %0d", i, res_rdata, ref_c[i]);
      end
    end
  endtask

  initial begin
    a_we = 0; b_we = 0; start = 0; res_re = 0; a_addr = 0; b_addr = 0; res_addr = 0;
    a_wdata = '0; b_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1);
    run(0);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
