// tb_lbc_pm_top: end-to-end test of the top at its default parameters.
// Both multipliers are loaded and started in the same cycle, so they run at
// the same time, and their results are compared with schoolbook negacyclic
// products computed here (mod 2^13 for KaratSaber, mod 7681 for SK).
// Besides the results and the cycle counts (at most 82 and 8787 cycles, the
// figures reported for the two designs) the testbench counts how often each
// mechanism of the designs was exercised and counts a failure for any that
// never happened:
//   KaratSaber: register-set load overlapping a multiplication, overwrite and
//   accumulate loads, both STM arrays issuing in one cycle, zero-padded second
//   multiplicand, cycles with a multiplier idle (stall), negative secrets,
//   all nine post-process instruction codes, start ignored while busy;
//   SK: partial sum read back (stack), first/last DSP flush, result writes in
//   the wrapped (i < 128) and plain (i >= 128) halves, both cores busy at once.
module tb_lbc_pm_top;
  import ks_pkg::subpoly_t, ks_pkg::bsub_t, ks_pkg::map_code_t;

  localparam int N = 256;
  localparam longint SKQ = 7681;

  logic clk = 1'b0, rst_n = 1'b0;
  logic        ks_a_we, ks_b_we, ks_start, ks_busy, ks_done, ks_res_re;
  logic [3:0]  ks_a_addr, ks_b_addr, ks_res_addr;
  subpoly_t    ks_a_wdata, ks_res_rdata;
  bsub_t       ks_b_wdata;
  logic [15:0] ks_mult_cycles, ks_stall_cycles;
  logic        sk_a_we, sk_b_we, sk_start, sk_busy, sk_done, sk_res_re;
  logic [7:0]  sk_a_addr, sk_b_addr, sk_res_addr;
  logic [12:0] sk_a_wdata, sk_res_rdata;
  logic [5:0]  sk_b_wdata;
  logic [15:0] sk_cycles;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lbc_pm_top dut (.*);

  // ---------------- mechanism counters ----------------
  int n_overlap, n_ovw, n_addload, n_dual, n_pad, n_stall, n_neg, n_ignored;
  int n_code [9];
  int n_stack, n_first, n_last, n_wrap, n_plain, n_both;

  initial begin
    n_overlap = 0; n_ovw = 0; n_addload = 0; n_dual = 0; n_pad = 0; n_stall = 0;
    n_neg = 0; n_ignored = 0; n_stack = 0; n_first = 0; n_last = 0;
    n_wrap = 0; n_plain = 0; n_both = 0;
    for (int c = 0; c < 9; c++) n_code[c] = 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ks.ld.valid && (dut.u_ks.op1.valid || dut.u_ks.op2.valid)) n_overlap++;
    if (dut.u_ks.ld.valid &&  dut.u_ks.ld.ovw) n_ovw++;
    if (dut.u_ks.ld.valid && !dut.u_ks.ld.ovw) n_addload++;
    if (dut.u_ks.op2.valid) n_dual++;
    if ((dut.u_ks.op1.valid && dut.u_ks.op1.b2_zero) ||
        (dut.u_ks.op2.valid && dut.u_ks.op2.b2_zero)) n_pad++;
    if (dut.u_ks.u_ctrl.busy && dut.u_ks.u_ctrl.ptr.g < 4'd9 && !dut.u_ks.op2.valid) n_stall++;
    for (int t = 0; t < 16; t++) begin
      n_code[int'(dut.u_ks.c1[t])]++;
      n_code[int'(dut.u_ks.c2[t])]++;
    end
    if (ks_start && ks_busy) n_ignored++;
    if (dut.u_sk.sq_op && dut.u_sk.sq_stack) n_stack++;
    if (dut.u_sk.sq_op && dut.u_sk.sq_first) n_first++;
    if (dut.u_sk.sq_op && dut.u_sk.sq_last) n_last++;
    if (dut.u_sk.res_we && !dut.u_sk.res_waddr[7]) n_wrap++;
    if (dut.u_sk.res_we &&  dut.u_sk.res_waddr[7]) n_plain++;
    if (ks_busy && sk_busy) n_both++;
  end

  // ---------------- operands and references ----------------
  int unsigned ka [N];
  int kb [N];
  int unsigned sa [N], sb [N];
  int unsigned kref [N], sref [N];

  function automatic logic [3:0] enc(int v);
    return (v < 0) ? {1'b1, 3'(-v)} : {1'b0, 3'(v)};
  endfunction

  task automatic make_refs();
    longint ak [N];
    longint as [N];
    for (int k = 0; k < N; k++) begin ak[k] = 0; as[k] = 0; end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (i + j < N) begin
          ak[i+j] += longint'(ka[i]) * kb[j];
          as[i+j] += longint'(sa[i]) * sb[j];
        end else begin
          ak[i+j-N] -= longint'(ka[i]) * kb[j];
          as[i+j-N] -= longint'(sa[i]) * sb[j];
        end
    for (int k = 0; k < N; k++) begin
      kref[k] = 32'(ak[k] & 64'h1FFF);
      sref[k] = 32'(((as[k] % SKQ) + SKQ) % SKQ);
    end
  endtask

  task automatic run();
    int kcyc_seen;
    for (int i = 0; i < N; i++) begin
      ka[i] = $urandom_range(8191);
      kb[i] = int'($urandom_range(10)) - 5;
      if (kb[i] < 0) n_neg++;
      sa[i] = $urandom_range(7680);
      sb[i] = $urandom_range(31);
    end
    make_refs();
    // load: SK needs 256 writes, KaratSaber 16 words
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      sk_a_we = 1'b1; sk_a_addr = 8'(i); sk_a_wdata = 13'(sa[i]);
      sk_b_we = 1'b1; sk_b_addr = 8'(i); sk_b_wdata = 6'(sb[i]);
      ks_a_we = (i < 16); ks_b_we = (i < 16);
      ks_a_addr = 4'(i); ks_b_addr = 4'(i);
      if (i < 16)
        for (int c = 0; c < 16; c++) begin
          ks_a_wdata[c] = 13'(ka[16*i+c]);
          ks_b_wdata[c] = enc(kb[16*i+c]);
        end
    end
    @(negedge clk);
    sk_a_we = 0; sk_b_we = 0; ks_a_we = 0; ks_b_we = 0;
    ks_start = 1; sk_start = 1;
    @(negedge clk);
    ks_start = 0; sk_start = 0;
    @(negedge clk);
    ks_start = 1;                       // must be ignored
    @(negedge clk);
    ks_start = 0;
    while (!ks_done) @(negedge clk);
    checks++;
    $display("KaratSaber: %0d cycles, %0d with a multiplier idle", ks_mult_cycles, ks_stall_cycles);
    if (ks_mult_cycles > 16'd82) begin failures++; $display("FAIL: KaratSaber slower than 82 cycles"); end
    for (int w = 0; w < 16; w++) begin
      ks_res_re = 1; ks_res_addr = 4'(w);
      @(negedge clk);
      ks_res_re = 0;
      for (int c = 0; c < 16; c++) begin
        checks++;
        if (ks_res_rdata[c] !== 13'(kref[16*w+c])) begin
          failures++;
          if (failures < 10) $display("FAIL ks c[%0d]=%0d exp %0d", 16*w+c, ks_res_rdata[c], kref[16*w+c]);
        end
      end
    end
    while (!sk_done) @(negedge clk);
    checks++;
    $display("SK: %0d cycles", sk_cycles);
    if (sk_cycles > 16'd8787) begin failures++; $display("FAIL: SK slower than 8787 cycles"); end
    for (int i = 0; i < N; i++) begin
      sk_res_re = 1; sk_res_addr = 8'(i);
      @(negedge clk);
      sk_res_re = 0;
      checks++;
      if (sk_res_rdata !== 13'(sref[i])) begin
        failures++;
        if (failures < 10) $display("FAIL sk c[%0d]=%0d exp %0d", i, sk_res_rdata, sref[i]);
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL: mechanism never exercised: %s", what); end
  endtask

  initial begin
    ks_a_we = 0; ks_b_we = 0; ks_start = 0; ks_res_re = 0; ks_a_addr = 0; ks_b_addr = 0;
    ks_res_addr = 0; ks_a_wdata = '0; ks_b_wdata = '0;
    sk_a_we = 0; sk_b_we = 0; sk_start = 0; sk_res_re = 0; sk_a_addr = 0; sk_b_addr = 0;
    sk_res_addr = 0; sk_a_wdata = '0; sk_b_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run();
    run();
    $display("mechanisms:");
    need("KS load overlapping a multiplication", n_overlap);
    need("KS overwrite loads", n_ovw);
    need("KS accumulate loads", n_addload);
    need("KS cycles with both STM arrays", n_dual);
    need("KS zero-padded second multiplicand", n_pad);
    need("KS cycles with a multiplier idle", n_stall);
    need("KS negative secret coefficients", n_neg);
    need("KS start ignored while busy", n_ignored);
    for (int c = 1; c < 9; c++) need($sformatf("KS post-process code %0d", c), n_code[c]);
    need("SK partial sums read back", n_stack);
    need("SK first (no odd carry) steps", n_first);
    need("SK last (flush) steps", n_last);
    need("SK wrapped result writes (i < 128)", n_wrap);
    need("SK plain result writes (i >= 128)", n_plain);
    need("cycles with both cores busy", n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
