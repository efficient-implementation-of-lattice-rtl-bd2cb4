// k_combi_nega: last stage of the SK multiplier (karatsuba 1_2 + negacyclic).
//
// Combines the three half products directly into the result modulo
// x^256 + 1, never forming the 511-coefficient ab_full:
//   ab = ab_low + x^128 * (ab_mid - ab_low - ab_high) + x^256 * ab_high
//      = ab_low - ab_high + x^128 * ab_newmid           (x^256 = -1)
// so with j = (i + 128) mod 256
//   l_sub_h = ab_low[i] - ab_high[i]
//   m_sub   = ab_mid[j] - ab_high[j] - ab_low[j]        (= ab_newmid[j])
//   ab_res[i] = l_sub_h - m_sub   for i < 128  (wrapped term, negated)
//   ab_res[i] = l_sub_h + m_sub   for i >= 128
// all modulo q. The half products have 255 coefficients; index 255 reads as 0.
//
// Timing: one result coefficient per cycle, 256 issue cycles. Reads are issued
// at cycle t through two read ports of ab_low and ab_high and one of ab_mid,
// the result is written at t+1; done pulses after the last write.
module k_combi_nega
  import sk_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic       rd_re,
  output logic [7:0] rd_addr_i,      // port 0 of ab_low/ab_high
  output logic [7:0] rd_addr_j,      // port 1 of ab_low/ab_high/ab_mid
  input  coef_t      low_i, high_i,
  input  coef_t      low_j, high_j, mid_j,
  output logic       res_we,
  output logic [7:0] res_waddr,
  output coef_t      res_wdata
);

  logic       run, v_q;
  logic [7:0] i, i_q;
  coef_t      l1, h1, l2, h2, m, lsh, msub;

  assign busy      = run || v_q;
  assign rd_re     = run;
  assign rd_addr_i = i;
  assign rd_addr_j = i + 8'(HALF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      v_q  <= 1'b0;
      i    <= '0;
      i_q  <= '0;
      done <= 1'b0;
    end else begin
      v_q  <= run;
      i_q  <= i;
      done <= v_q && !run;
      if (!run) begin
        if (start && !v_q) begin run <= 1'b1; i <= '0; end
      end else begin
        i <= i + 1;
        if (i == 8'(N - 1)) run <= 1'b0;
      end
    end
  end

  always_comb begin
    // coefficient 255 of a half product does not exist
    l1   = (i_q == 8'd255) ? '0 : low_i;
    h1   = (i_q == 8'd255) ? '0 : high_i;
    l2   = (i_q == 8'd127) ? '0 : low_j;
    h2   = (i_q == 8'd127) ? '0 : high_j;
    m    = (i_q == 8'd127) ? '0 : mid_j;
    lsh  = mod_sub(l1, h1);
    msub = mod_sub(mod_sub(m, h2), l2);
    res_wdata = i_q[7] ? mod_add(lsh, msub) : mod_sub(lsh, msub);
  end

  assign res_we    = v_q;
  assign res_waddr = i_q;

endmodule
