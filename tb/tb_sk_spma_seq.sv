// tb_sk_spma_seq: the spma loop sequencer. Checks the step order (pair k
// outer, i = 0..128 inner, b pair read only at i = 0), the alignment of each
// step's signals (lane operands and partial-sum read one cycle after the
// memory read, write-back three cycles after it, c = i + 2k), stack_en low
// exactly where c is touched for the first time, every result address written
// 64 or fewer times with the right count, and the length: 64 x 129 = 8256
// issue cycles plus the pipeline.
module tb_sk_spma_seq;
  import sk_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, rd_valid, b_re, op_valid, first, last, stack_en, st_re, wr_en;
  logic [6:0] a_idx;
  logic [5:0] b_pair;
  logic [7:0] st_addr, wr_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sk_spma_seq dut (.*);

  typedef struct { int i; int k; } step_t;
  step_t q1 [$], q3 [$];
  int ei, ek, nw [256];
  bit touched [256];

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  always @(negedge clk) if (rst_n) begin
    if (rd_valid) begin
      step_t s;
      checks++;
      if (int'(a_idx) != (ei % 128) || int'(b_pair) != ek || b_re != (ei == 0)) fail("read step");
      s.i = ei; s.k = ek;
      q1.push_back(s);
      ei++;
      if (ei == 129) begin ei = 0; ek++; end
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (op_valid) begin
      step_t s;
      int c;
      s = q1.pop_front();
      c = s.i + 2 * s.k;
      checks++;
      if (!st_re || int'(st_addr) != c || first != (s.i == 0) || last != (s.i == 128)) fail("operand step");
      checks++;
      if (stack_en != touched[c]) fail($sformatf("stack_en at k=%0d i=%0d", s.k, s.i));
      touched[c] = 1'b1;
      q3.push_back(s);
    end
  end

  // write-back: two cycles after op_valid
  step_t pipe [2];
  bit    pv [2];
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (wr_en != pv[1]) fail("write enable");
    else if (wr_en) begin
      nw[wr_addr]++;
      if (int'(wr_addr) != pipe[1].i + 2 * pipe[1].k) fail("write address");
    end
    pipe[1] = pipe[0]; pv[1] = pv[0];
    pv[0] = op_valid;
    if (op_valid) pipe[0] = q3.pop_front();
  end

  initial begin
    int cyc;
    start = 0; ei = 0; ek = 0; pv[0] = 0; pv[1] = 0;
    for (int c = 0; c < 256; c++) begin nw[c] = 0; touched[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    $display("spma sequence: %0d cycles", cyc);
    checks++;
    if (cyc != 8256 + 4) begin failures++; $display("FAIL: %0d cycles, expected %0d", cyc, 8256 + 4); end
    for (int c = 0; c < 256; c++) begin
      int e;
      e = 0;
      for (int k = 0; k < 64; k++) if (c - 2 * k >= 0 && c - 2 * k <= 128) e++;
      checks++;
      if (nw[c] != e) fail($sformatf("address %0d written %0d times, expected %0d", c, nw[c], e));
    end
    checks++;
    if (ek != 64 || ei != 0) fail("step count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
