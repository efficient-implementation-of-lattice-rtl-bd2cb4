// tb_karatsaber_core: end-to-end check of the KaratSaber multiplier.
// Loads random a (13-bit coefficients) and b (coefficients in [-5,5]), runs
// one multiplication and compares all 256 result coefficients with a
// schoolbook negacyclic product mod 2^13 computed here. Several vectors,
// including the extreme values b = +5/-5 everywhere and a = 8191 everywhere,
// and random vectors for each of the three secret ranges of the Saber
// security levels, [-3,3], [-4,4] and [-5,5].
// Also checks the multiplication latency against the 82 cycles reported for
// the design and that a start while busy is ignored.
module tb_karatsaber_core;
  import ks_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic a_we, b_we, start, busy, done, res_re;
  logic [3:0] a_addr, b_addr, res_addr;
  subpoly_t a_wdata, res_rdata;
  bsub_t b_wdata;
  logic [15:0] mult_cycles, stall_cycles;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  karatsaber_core dut (.*);

  int unsigned a [N];
  int b [N];
  int unsigned ref_c [N];

  function automatic bcoef_t enc(int v);
    return (v < 0) ? bcoef_t'({1'b1, 3'(-v)}) : bcoef_t'({1'b0, 3'(v)});
  endfunction

  task automatic reference();
    longint acc [N];
    for (int k = 0; k < N; k++) acc[k] = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (i + j < N) acc[i+j] += longint'(a[i]) * b[j];
        else           acc[i+j-N] -= longint'(a[i]) * b[j];
    for (int k = 0; k < N; k++) ref_c[k] = 32'(acc[k] & 64'h1FFF);
  endtask

  task automatic run(int mode);
    int cyc;
    for (int i = 0; i < N; i++) begin
      case (mode)
        1: begin a[i] = 8191; b[i] = 5; end
        2: begin a[i] = 8191; b[i] = -5; end
        3: begin a[i] = $urandom_range(8191); b[i] = int'($urandom_range(6)) - 3; end
        4: begin a[i] = $urandom_range(8191); b[i] = int'($urandom_range(8)) - 4; end
        default: begin a[i] = $urandom_range(8191); b[i] = int'($urandom_range(10)) - 5; end
      endcase
    end
    reference();
    for (int w = 0; w < NTOP; w++) begin
      @(negedge clk);
      a_we = 1'b1; a_addr = 4'(w); b_we = 1'b1; b_addr = 4'(w);
      for (int i = 0; i < SUBN; i++) begin
        a_wdata[i] = coef_t'(a[16*w+i]);
        b_wdata[i] = enc(b[16*w+i]);
      end
    end
    @(negedge clk);
    a_we = 1'b0; b_we = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    @(negedge clk);
    start = 1'b1;              // ignored: core is busy
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    $display("multiplication: %0d cycles (start to final accumulators), %0d cycles with a multiplier idle",
             mult_cycles, stall_cycles);
    checks++;
    if (mult_cycles > 16'd82) begin
      failures++;
      $display("FAIL: %0d cycles, more than 82", mult_cycles);
    end
    for (int w = 0; w < NACC; w++) begin
      @(negedge clk);
      res_re = 1'b1; res_addr = 4'(w);
      @(negedge clk);
      res_re = 1'b0;
      for (int i = 0; i < SUBN; i++) begin
        checks++;
        if (res_rdata[i] !== coef_t'(ref_c[16*w+i])) begin
          failures++;
          if (failures < 10) $display("FAIL c[%0d] = %0d, expected %0d", 16*w+i, res_rdata[i], ref_c[16*w+i]);
        end
      end
    end
    checks++;
    if (busy) begin failures++; $display("FAIL: still busy (second start not ignored?)"); end
  endtask

  initial begin
    a_we = 0; b_we = 0; start = 0; res_re = 0; a_addr = 0; b_addr = 0; res_addr = 0;
    a_wdata = '0; b_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1);
    run(2);
    run(3);                    // secret range [-3,3]
    run(4);                    // secret range [-4,4]
    for (int t = 0; t < 3; t++) run(0);   // secret range [-5,5]
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
