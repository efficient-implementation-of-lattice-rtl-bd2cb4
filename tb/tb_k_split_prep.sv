// tb_k_split_prep: karatsuba 1_1 and prep_input against memory models.
// The testbench holds a and b in registered-read memories (as in the
// multiplier), runs the stage and checks a_mid[i] = (a[i] + a[128+i]) mod
// 7681, b_mid[i] = b[i] + b[128+i] and the b_low copy, every entry written
// exactly once, and the stage length of 256 cycles (128 + 128) from start to
// done plus the one-cycle write-back.
module tb_k_split_prep;
  import sk_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, stage_prep, rd_re;
  logic [7:0] rd_addr0, rd_addr1;
  coef_t a_rdata0, a_rdata1, amid_wdata;
  bcoef_t b_rdata0, b_rdata1, bmid_wdata, blow_wdata;
  logic amid_we, bmid_we, blow_we;
  logic [6:0] amid_waddr, bmid_waddr, blow_waddr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  k_split_prep dut (.*);

  int unsigned a [256], b [256];
  int unsigned amid [128], bmid [128], blow [128];
  int namid [128], nbmid [128], nblow [128];

  always @(posedge clk) if (rd_re) begin
    a_rdata0 <= coef_t'(a[rd_addr0]);  a_rdata1 <= coef_t'(a[rd_addr1]);
    b_rdata0 <= bcoef_t'(b[rd_addr0]); b_rdata1 <= bcoef_t'(b[rd_addr1]);
  end

  always @(posedge clk) begin
    if (amid_we) begin amid[amid_waddr] = amid_wdata; namid[amid_waddr]++; end
    if (bmid_we) begin bmid[bmid_waddr] = bmid_wdata; nbmid[bmid_waddr]++; end
    if (blow_we) begin blow[blow_waddr] = blow_wdata; nblow[blow_waddr]++; end
  end

  task automatic run(int mode);
    int cyc;
    for (int i = 0; i < 256; i++) begin
      a[i] = (mode == 0) ? 7680 : $urandom_range(7680);
      b[i] = (mode == 0) ? 31 : $urandom_range(31);
    end
    for (int i = 0; i < 128; i++) begin namid[i] = 0; nbmid[i] = 0; nblow[i] = 0; end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    $display("split + prep: %0d cycles", cyc);
    if (cyc != 258) begin failures++; $display("FAIL: %0d cycles, expected 258", cyc); end
    for (int i = 0; i < 128; i++) begin
      checks += 3;
      if (namid[i] != 1 || amid[i] != (a[i] + a[128+i]) % Q) begin failures++; if (failures < 10) $display("FAIL a_mid[%0d]", i); end
      if (nbmid[i] != 1 || bmid[i] != b[i] + b[128+i]) begin failures++; if (failures < 10) $display("FAIL b_mid[%0d]", i); end
      if (nblow[i] != 1 || blow[i] != b[i]) begin failures++; if (failures < 10) $display("FAIL b_low[%0d]", i); end
    end
    checks++;
    if (busy) begin failures++; $display("FAIL: busy after done"); end
  endtask

  initial begin
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0);
    run(1);
    run(1);
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
