// ks_postprocess: code-based post-process mapper with negacyclic reduction.
//
// Takes one sub-polynomial product P (31 coefficients plus a zero coefficient
// on top), splits it into R_L = P[0..15] and R_H = P[16..31], and produces the
// contribution of P to each of the 16 accumulator sets acc_0..acc_15. What
// goes into acc_t is chosen by a 4-bit instruction code per (sub-polynomial,
// accumulator set): 0 nothing, 1 +R_L, 2 +R_H, 3 -R_L, 4 -R_H, 5 +R_H+R_L,
// 6 +R_H-R_L, 7 -R_H+R_L, 8 -R_H-R_L. The codes fold the four Karatsuba
// recombination layers and the reduction modulo x^256 + 1 into one step, so
// no 511-coefficient intermediate product is ever stored.
//
// The 81 x 16 code table is held as a constant ROM; it is computed at
// elaboration by ks_pkg::map_code() instead of being written out by hand.
// Its first nine rows are identical to the source design's printed table.
//
// Purely combinational: delta is valid in the same cycle as prod.
module ks_postprocess
  import ks_pkg::*;
(
  input  logic       in_valid,
  input  prod_t      prod,
  input  logic [6:0] sub,                  // sub-polynomial number 0..80
  output subpoly_t   delta [NACC],         // contribution to acc_0..acc_15
  output map_code_t  codes [NACC]          // code row used (for observation)
);

  map_code_t code_rom [NSUB][NACC];

  for (genvar k = 0; k < NSUB; k++) begin : g_sub
    for (genvar t = 0; t < NACC; t++) begin : g_acc
      localparam map_code_t C = map_code(k, t);
      assign code_rom[k][t] = C;
    end
  end

  subpoly_t rl, rh;
  assign rl = prod[SUBN-1:0];
  assign rh = prod[2*SUBN-1:SUBN];

  always_comb begin
    for (int t = 0; t < NACC; t++) begin
      codes[t] = (in_valid && sub < 7'(NSUB)) ? code_rom[sub][t] : C_NOP;
      for (int i = 0; i < SUBN; i++) begin
        case (codes[t])
          C_PL:    delta[t][i] = rl[i];
          C_PH:    delta[t][i] = rh[i];
          C_ML:    delta[t][i] = -rl[i];
          C_MH:    delta[t][i] = -rh[i];
          C_PH_PL: delta[t][i] = rh[i] + rl[i];
          C_PH_ML: delta[t][i] = rh[i] - rl[i];
          C_MH_PL: delta[t][i] = rl[i] - rh[i];
          C_MH_ML: delta[t][i] = -(rh[i] + rl[i]);
          default: delta[t][i] = '0;
        endcase
      end
    end
  end

endmodule
