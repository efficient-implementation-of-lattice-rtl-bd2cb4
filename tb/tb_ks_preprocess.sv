// tb_ks_preprocess: input buffers, register sets and selectors.
// Random a and b are written to the input buffers; then random load ops
// (word, position, overwrite or accumulate) and random selector requests are
// applied every cycle. A model of the nine register sets (R_r holds the
// group positions of its pattern; an overwrite replaces the first position
// it holds, any other load adds, mod 2^13) must match what the selectors
// return; a register set read in the same cycle as it is loaded returns the
// old value. The selectors are combinational.
module tb_ks_preprocess;
  import ks_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a_we, b_we;
  logic [3:0] a_addr, b_addr;
  subpoly_t a_wdata, a_sel1, a_sel2;
  bsub_t b_wdata, b1_sel1, b2_sel1, b1_sel2, b2_sel2;
  load_op_t ld;
  mult_op_t op1, op2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ks_preprocess dut (.*);

  subpoly_t am [16];
  bsub_t bm [16];
  subpoly_t rm [9];

  function automatic int first_pos(int r);
    logic [3:0] mk;
    mk = reg_mask(r);
    return mk[0] ? 0 : mk[1] ? 1 : mk[2] ? 2 : 3;
  endfunction

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = '0; b_wdata = '0;
    ld = '0; op1 = '0; op2 = '0;
    for (int r = 0; r < 9; r++) rm[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 16; w++) begin
      @(negedge clk);
      a_we = 1; b_we = 1; a_addr = 4'(w); b_addr = 4'(w);
      for (int i = 0; i < 16; i++) begin
        a_wdata[i] = coef_t'($urandom_range(8191));
        b_wdata[i] = bcoef_t'($urandom_range(15));
      end
      am[w] = a_wdata; bm[w] = b_wdata;
    end
    @(negedge clk);
    a_we = 0; b_we = 0;
    for (int n = 0; n < 2000; n++) begin
      ld.valid = ($urandom_range(1) == 1);
      ld.word = 4'($urandom_range(15));
      ld.pos = 2'($urandom_range(3));
      ld.ovw = ($urandom_range(1) == 1);
      op1.rsel = 4'($urandom_range(8)); op1.bsel1 = 4'($urandom_range(15)); op1.bsel2 = 4'($urandom_range(15));
      op2.rsel = 4'($urandom_range(8)); op2.bsel1 = 4'($urandom_range(15)); op2.bsel2 = 4'($urandom_range(15));
      #1;
      checks += 6;
      if (a_sel1 !== rm[op1.rsel]) begin failures++; if (failures < 10) $display("FAIL a_sel1 R%0d step %0d", op1.rsel + 1, n); end
      if (a_sel2 !== rm[op2.rsel]) begin failures++; if (failures < 10) $display("FAIL a_sel2 R%0d step %0d", op2.rsel + 1, n); end
      if (b1_sel1 !== bm[op1.bsel1]) failures++;
      if (b2_sel1 !== bm[op1.bsel2]) failures++;
      if (b1_sel2 !== bm[op2.bsel1]) failures++;
      if (b2_sel2 !== bm[op2.bsel2]) failures++;
      if (ld.valid)
        for (int r = 0; r < 9; r++)
          if (reg_mask(r)[ld.pos]) begin
            if (ld.ovw && int'(ld.pos) == first_pos(r)) rm[r] = am[ld.word];
            else for (int i = 0; i < 16; i++) rm[r][i] = rm[r][i] + am[ld.word][i];
          end
      @(negedge clk);
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
