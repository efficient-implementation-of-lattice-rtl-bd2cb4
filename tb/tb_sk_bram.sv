// tb_sk_bram: random traffic on the one-write, two-read memory against a
// model, at the default 256 x 13 size: each read port returns the word one
// cycle after its enable and holds it while the enable is low.
module tb_sk_bram;
  logic clk = 1'b0;
  logic we, re0, re1;
  logic [7:0] waddr, raddr0, raddr1;
  logic [12:0] wdata, rdata0, rdata1, model [256], e0, e1;
  logic v0 = 1'b0, v1 = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sk_bram dut (.*);

  initial begin
    we = 0; re0 = 0; re1 = 0; waddr = 0; raddr0 = 0; raddr1 = 0; wdata = 0;
    for (int w = 0; w < 256; w++) begin
      @(negedge clk);
      we = 1; waddr = 8'(w); wdata = 13'($urandom); model[w] = wdata;
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (v0) begin checks++; if (rdata0 !== e0) begin failures++; if (failures < 10) $display("FAIL port 0 step %0d", t); end end
      if (v1) begin checks++; if (rdata1 !== e1) begin failures++; if (failures < 10) $display("FAIL port 1 step %0d", t); end end
      we = ($urandom_range(1) == 1); waddr = 8'($urandom); wdata = 13'($urandom);
      re0 = ($urandom_range(1) == 1); raddr0 = 8'($urandom);
      re1 = ($urandom_range(1) == 1); raddr1 = 8'($urandom);
      if (re0) begin e0 = model[raddr0]; v0 = !(we && waddr == raddr0); end
      if (re1) begin e1 = model[raddr1]; v1 = !(we && waddr == raddr1); end
      if (we) model[waddr] = wdata;
    end
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
