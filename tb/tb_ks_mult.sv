// tb_ks_mult: one STM array (16 x 16 sub-polynomial product with two b
// multiplicands). Random operands, a new operation every cycle, including
// zero-padded second multiplicands; every product must equal
// a * (b1 + b2) (31 coefficients mod 2^13, coefficient 31 zero) and appear
// two clock edges after the operands, with the sub-polynomial tag
// (operands and results are both observed at the falling edge).
module tb_ks_mult;
  import ks_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, b2_zero, out_valid;
  subpoly_t a_in;
  bsub_t b1_in, b2_in;
  logic [6:0] sub_in, sub_out;
  prod_t prod;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ks_mult dut (.*);

  typedef struct {
    int unsigned c [32];
    int unsigned sub;
    int cycle;
  } exp_t;
  exp_t q [$];
  int cyc = 0;

  always @(posedge clk) cyc++;

  function automatic int dec(logic [3:0] v);
    return v[3] ? -int'(v[2:0]) : int'(v[2:0]);
  endfunction

  function automatic bcoef_t enc(int v);
    return (v < 0) ? bcoef_t'({1'b1, 3'(-v)}) : bcoef_t'({1'b0, 3'(v)});
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
      else begin
        e = q.pop_front();
        if (cyc - e.cycle != 2) begin failures++; $display("FAIL: latency %0d", cyc - e.cycle); end
        if (sub_out != 7'(e.sub)) begin failures++; $display("FAIL: tag"); end
        for (int k = 0; k < 32; k++) begin
          checks++;
          if (prod[k] !== coef_t'(e.c[k])) begin
            failures++;
            if (failures < 10) $display("FAIL prod[%0d]=%0d exp %0d", k, prod[k], e.c[k]);
          end
        end
      end
    end
  end

  initial begin
    in_valid = 0; b2_zero = 0; a_in = '0; b1_in = '0; b2_in = '0; sub_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      exp_t e;
      int b1 [16];
      int b2 [16];
      longint acc;
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      b2_zero = ($urandom_range(3) == 0);
      sub_in = 7'($urandom_range(80));
      for (int i = 0; i < 16; i++) begin
        a_in[i] = (t == 0) ? 13'h1FFF : coef_t'($urandom_range(8191));
        b1[i] = (t == 0) ? -5 : int'($urandom_range(10)) - 5;
        b2[i] = (t == 0) ? -5 : int'($urandom_range(10)) - 5;
        b1_in[i] = enc(b1[i]); b2_in[i] = enc(b2[i]);
        if (b2_zero) b2[i] = 0;
      end
      if (in_valid) begin
        for (int k = 0; k < 32; k++) begin
          acc = 0;
          for (int i = 0; i < 16; i++)
            if (k - i >= 0 && k - i < 16) acc += longint'(a_in[i]) * (b1[k-i] + b2[k-i]);
          e.c[k] = 32'(acc & 64'h1FFF);
        end
        e.sub = sub_in;
        e.cycle = cyc;
        q.push_back(e);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d products missing", q.size()); end
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
