// ks_mult: sub-polynomial multiplier built from 256 STM units.
//
// One 16-coefficient sub-polynomial A of a (13-bit coefficients) is multiplied
// by the sum B1 + B2 of two 16-coefficient top-layer sub-polynomials of b,
// without ever forming B1 + B2 (the "partial sub-polynomial multiplication":
// A*(B1+B2) = A*B1 + A*B2, so b never grows beyond its 4-bit range).
// STM (i,j) forms A[i]*(B1[j]+B2[j]); the 256 results are summed along the
// anti-diagonals i+j = k into the 31-coefficient linear product, mod 2^13.
// Coefficient 31 of the result is the 13-bit zero the mapper concatenates
// on top before splitting into R_L (coefficients 0..15) and R_H (16..31);
// it is a constant zero output on purpose (a 16x16 product has 31 terms).
//
// When b2_zero is set the second multiplicand is 0 (single-multiplicand
// sub-polynomials such as a_0*b_0).
//
// Timing: operands are registered at the input when in_valid is high; the
// product is registered at the output, so the result appears two cycles after
// the operands (out_valid), one result per cycle. The source pipelines the
// STM stage but gives no stage count; two stages are this design's choice.
module ks_mult
  import ks_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  subpoly_t a_in,
  input  bsub_t    b1_in,
  input  bsub_t    b2_in,
  input  logic     b2_zero,
  input  logic [6:0] sub_in,     // sub-polynomial number, carried along
  output logic     out_valid,
  output prod_t    prod,
  output logic [6:0] sub_out
);

  subpoly_t a_q;
  bsub_t    b1_q, b2_q;
  logic     v_q;
  logic [6:0] sub_q;
  coef_t    pp [SUBN][SUBN];
  prod_t    sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q   <= 1'b0;
      a_q   <= '0;
      b1_q  <= '0;
      b2_q  <= '0;
      sub_q <= '0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        a_q   <= a_in;
        b1_q  <= b1_in;
        b2_q  <= b2_zero ? '0 : b2_in;
        sub_q <= sub_in;
      end
    end
  end

  for (genvar i = 0; i < SUBN; i++) begin : g_row
    for (genvar j = 0; j < SUBN; j++) begin : g_col
      ks_stm u_stm (
        .mlier (a_q[i]),
        .mcand1(b1_q[j]),
        .mcand2(b2_q[j]),
        .mres  (pp[i][j])
      );
    end
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < SUBN; i++)
      for (int j = 0; j < SUBN; j++)
        sum[i+j] = sum[i+j] + pp[i][j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      prod      <= '0;
      sub_out   <= '0;
    end else begin
      out_valid <= v_q;
      if (v_q) begin
        prod    <= sum;
        sub_out <= sub_q;
      end
    end
  end

endmodule
