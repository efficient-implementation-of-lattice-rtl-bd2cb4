// tb_ks_ctrl: the KaratSaber controller on its own.
// The testbench tracks which top-layer sub-polynomials of a each of the nine
// register sets holds (following the controller's load ops with the
// overwrite / accumulate rule of the pre-process) and checks, for every
// multiply op:
//   - the register set holds exactly the top-layer parts of a that make up
//     sub-polynomial op.sub (derived here from its four Karatsuba digits), so
//     no op reads a register set too early or after it was overwritten;
//   - each b multiplicand belongs to the same set of top-layer parts;
// and at the end that every one of the 81 sub-polynomials was multiplied with
// each of its b parts exactly once (256 products in 136 STM calls), that the
// call count is 136 (the work of 68 cycles of two calls), and that it finished
// in at most 82 cycles (the figure reported for the design).
module tb_ks_ctrl;
  import ks_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, clear;
  load_op_t ld;
  mult_op_t op1, op2;
  logic [15:0] cycle_cnt, stall_cnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ks_ctrl dut (.*);

  logic [15:0] content [9];
  int cov [81][16];
  int nops, nslots;

  // top-layer parts of sub-polynomial k: bit p of the top index is fixed by
  // Karatsuba digit p (L: 0, H: 1, M: either)
  function automatic logic [15:0] aset(int k);
    int dg [4];
    logic [15:0] s;
    dg[0] = k % 3; dg[1] = (k / 3) % 3; dg[2] = (k / 9) % 3;
    dg[3] = (k / 27 == 0) ? 0 : (k / 27 == 1) ? 2 : 1;     // top layer numbered L, M, H
    s = '0;
    for (int w = 0; w < 16; w++) begin
      bit ok;
      ok = 1;
      for (int p = 0; p < 4; p++)
        if (!(dg[p] == 2 || dg[p] == int'(w[p]))) ok = 0;   // 0 = L, 1 = H, 2 = M
      s[w] = ok;
    end
    return s;
  endfunction

  function automatic int first_pos(int r);
    logic [3:0] mk;
    mk = reg_mask(r);
    return mk[0] ? 0 : mk[1] ? 1 : mk[2] ? 2 : 3;
  endfunction

  task automatic check_op(mult_op_t op);
    logic [15:0] s;
    nops++;
    s = aset(int'(op.sub));
    checks++;
    if (content[op.rsel] !== s) begin
      failures++;
      if (failures < 10) $display("FAIL sub %0d reads R%0d holding %h, needs %h", op.sub, op.rsel + 1, content[op.rsel], s);
    end
    checks++;
    if (!s[op.bsel1] || (!op.b2_zero && !s[op.bsel2])) begin failures++; if (failures < 10) $display("FAIL sub %0d b part", op.sub); end
    cov[op.sub][op.bsel1]++;
    if (!op.b2_zero) cov[op.sub][op.bsel2]++;
  endtask

  always @(negedge clk) if (rst_n) begin
    if (op2.valid && !op1.valid) begin failures++; $display("FAIL op2 without op1"); end
    if (op1.valid) begin nslots++; check_op(op1); end
    if (op2.valid) check_op(op2);
    if (ld.valid)
      for (int r = 0; r < 9; r++)
        if (reg_mask(r)[ld.pos]) begin
          if (ld.ovw && int'(ld.pos) == first_pos(r)) content[r] = 16'(1) << ld.word;
          else content[r] |= 16'(1) << ld.word;
        end
  end

  task automatic run();
    for (int k = 0; k < 81; k++) for (int w = 0; w < 16; w++) cov[k][w] = 0;
    nops = 0; nslots = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!clear) begin failures++; $display("FAIL: no clear after start"); end
    while (!done) @(negedge clk);
    $display("controller: %0d cycles, %0d op cycles, %0d STM calls, %0d stall cycles", cycle_cnt, nslots, nops, stall_cnt);
    checks++;
    if (cycle_cnt > 16'd82) begin failures++; $display("FAIL: more than 82 cycles"); end
    checks++;
    if (nops != 136) begin failures++; $display("FAIL: %0d STM calls, expected 136", nops); end
    for (int k = 0; k < 81; k++) begin
      logic [15:0] s;
      s = aset(k);
      for (int w = 0; w < 16; w++) begin
        checks++;
        if (cov[k][w] != (s[w] ? 1 : 0)) begin
          failures++;
          if (failures < 10) $display("FAIL sub %0d x b_%0d done %0d times", k, w, cov[k][w]);
        end
      end
    end
  endtask

  initial begin
    start = 0;
    for (int r = 0; r < 9; r++) content[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run();
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
