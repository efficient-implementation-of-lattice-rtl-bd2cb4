// ks_stm: Shift-Two-Multiplicand (STM) multiplier.
//
// Computes mres = mlier * v(mcand1) + mlier * v(mcand2) mod 2^13, where the
// multiplicands are small signed secret coefficients (|v| <= 5). No hardware
// multiplier is used: the multiples 0, a, 2a (a<<1), 3a (a + a<<1), 4a (a<<2)
// and 5a (a + a<<2) are built once from the shared multiplier, each
// multiplicand selects one of them through its own mux, a sign mux picks the
// value or its negation (2^13 - value), and the two selected terms are added.
// This follows the STM block diagram (shifters <<1 and <<2, two adders, two
// select muxes, constant 8192 for negation, final adder).
//
// Encoding of a multiplicand (this design's choice; the source only says the
// coefficient is 4 bits wide): {sign, magnitude[2:0]}. Magnitudes 6 and 7 do
// not occur in Saber (secret range [-5,5]) and select 0.
//
// Purely combinational; one result per cycle.
module ks_stm
  import ks_pkg::*;
(
  input  coef_t  mlier,    // 13-bit coefficient of a sub-polynomial of a
  input  bcoef_t mcand1,   // first multiplicand (sign-magnitude)
  input  bcoef_t mcand2,   // second multiplicand (sign-magnitude)
  output coef_t  mres      // mlier*(v1 + v2) mod 2^13
);

  coef_t sh1, sh2, x3, x5;
  coef_t sel1, sel2, term1, term2;

  assign sh1 = mlier << 1;
  assign sh2 = mlier << 2;
  assign x3  = mlier + sh1;
  assign x5  = mlier + sh2;

  function automatic coef_t pick(input logic [2:0] mag, input coef_t a1, input coef_t a2,
                                 input coef_t a3, input coef_t a4, input coef_t a5);
    case (mag)
      3'd1:    return a1;
      3'd2:    return a2;
      3'd3:    return a3;
      3'd4:    return a4;
      3'd5:    return a5;
      default: return '0;
    endcase
  endfunction

  always_comb begin
    sel1  = pick(mcand1[2:0], mlier, sh1, x3, sh2, x5);
    sel2  = pick(mcand2[2:0], mlier, sh1, x3, sh2, x5);
    // 8192 - x taken modulo 2^13 is the negation of x
    term1 = mcand1[3] ? coef_t'(14'd8192 - {1'b0, sel1}) : sel1;
    term2 = mcand2[3] ? coef_t'(14'd8192 - {1'b0, sel2}) : sel2;
    mres  = term1 + term2;
  end

endmodule
