// tb_k_combi_nega: karatsuba 1_2 with negacyclic reduction. Random half
// products (index 255, which a half product does not have, is filled with
// garbage that must be ignored) are served from registered-read memory
// models; every result coefficient must be
//   i <  128: (l[i] - h[i]) - (m[i+128] - h[i+128] - l[i+128])  mod 7681
//   i >= 128: (l[i] - h[i]) + (m[i-128] - h[i-128] - l[i-128])  mod 7681
// written exactly once; the stage must take 256 cycles plus its pipeline.
module tb_k_combi_nega;
  import sk_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, rd_re, res_we;
  logic [7:0] rd_addr_i, rd_addr_j, res_waddr;
  coef_t low_i, high_i, low_j, high_j, mid_j, res_wdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  k_combi_nega dut (.*);

  int unsigned l [256], h [256], m [256], res [256];
  int nres [256];

  always @(posedge clk) if (rd_re) begin
    low_i <= coef_t'(l[rd_addr_i]); high_i <= coef_t'(h[rd_addr_i]);
    low_j <= coef_t'(l[rd_addr_j]); high_j <= coef_t'(h[rd_addr_j]); mid_j <= coef_t'(m[rd_addr_j]);
  end
  always @(posedge clk) if (res_we) begin res[res_waddr] = res_wdata; nres[res_waddr]++; end

  function automatic int md(int v);
    return ((v % int'(Q)) + int'(Q)) % int'(Q);
  endfunction

  task automatic run();
    int cyc;
    for (int i = 0; i < 256; i++) begin
      l[i] = (i == 255) ? $urandom_range(8191) : $urandom_range(7680);
      h[i] = (i == 255) ? $urandom_range(8191) : $urandom_range(7680);
      m[i] = (i == 255) ? $urandom_range(8191) : $urandom_range(7680);
      nres[i] = 0;
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    $display("combination: %0d cycles", cyc);
    if (cyc != 258) begin failures++; $display("FAIL: %0d cycles, expected 258", cyc); end
    for (int i = 0; i < 256; i++) begin
      int j, li, hi, lj, hj, mj, e;
      j = (i + 128) % 256;
      li = (i == 255) ? 0 : int'(l[i]); hi = (i == 255) ? 0 : int'(h[i]);
      lj = (j == 255) ? 0 : int'(l[j]); hj = (j == 255) ? 0 : int'(h[j]); mj = (j == 255) ? 0 : int'(m[j]);
      e = (i < 128) ? md(li - hi - (mj - hj - lj)) : md(li - hi + (mj - hj - lj));
      checks++;
      if (nres[i] != 1 || res[i] != e) begin
        failures++;
        if (failures < 10) $display("FAIL res[%0d] = %0d (%0d writes), expected %0d", i, res[i], nres[i], e);
      end
    end
  endtask

  initial begin
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) run();
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
