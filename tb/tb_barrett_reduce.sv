// tb_barrett_reduce: exhaustive check of the Barrett reduction over every
// 20-bit input (every sum the DSP lane can produce): r must equal x mod 7681.
// Combinational, so no cycle count applies.
module tb_barrett_reduce;
  import sk_pkg::*;
  logic [SW-1:0] x;
  coef_t r;
  int checks = 0, failures = 0;

  barrett_reduce dut (.*);

  initial begin
    for (int v = 0; v < (1 << SW); v++) begin
      x = SW'(v);
      #1;
      checks++;
      if (r !== coef_t'(v % int'(Q))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d mod q = %0d", v, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
