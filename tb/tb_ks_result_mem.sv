// tb_ks_result_mem: random writes and reads of the 16-word result memory
// against a model; read data must appear one cycle after re and hold while
// re is low.
module tb_ks_result_mem;
  import ks_pkg::*;
  logic clk = 1'b0;
  logic we, re;
  logic [3:0] waddr, raddr;
  subpoly_t wdata, rdata, model [16], expect_q;
  logic exp_valid = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ks_result_mem dut (.*);

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int w = 0; w < 16; w++) begin
      @(negedge clk);
      we = 1; waddr = 4'(w);
      for (int i = 0; i < 16; i++) wdata[i] = coef_t'($urandom_range(8191));
      model[w] = wdata;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (exp_valid) begin
        checks++;
        if (rdata !== expect_q) begin failures++; if (failures < 10) $display("FAIL read at step %0d", t); end
      end
      we = ($urandom_range(1) == 1);
      waddr = 4'($urandom_range(15));
      for (int i = 0; i < 16; i++) wdata[i] = coef_t'($urandom_range(8191));
      re = ($urandom_range(1) == 1);
      raddr = 4'($urandom_range(15));
      if (re) begin expect_q = model[raddr]; exp_valid = 1; end
      if (re && we && waddr == raddr) exp_valid = 0;   // read-during-write: old or new, not checked
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
