// ks_acc_bank: the final register sets acc_0..acc_15 of the KaratSaber
// multiplier, 16 sets of 16 coefficients of 13 bits (the 256-coefficient
// result, already reduced modulo x^256 + 1).
//
// Every cycle the contributions of both post-process mappers are added into
// all sets at once (the adder that joins post-process 1 and 2); arithmetic is
// modulo 2^13, so Saber's power-of-two modulus needs no reduction step.
// clear zeroes the bank before a new multiplication (and wins over add).
//
// Timing: one accumulation per cycle, visible on acc the next cycle.
module ks_acc_bank
  import ks_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     add1,
  input  subpoly_t delta1 [NACC],
  input  logic     add2,
  input  subpoly_t delta2 [NACC],
  output subpoly_t acc [NACC]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NACC; t++) acc[t] <= '0;
    end else if (clear) begin
      for (int t = 0; t < NACC; t++) acc[t] <= '0;
    end else if (add1 || add2) begin
      for (int t = 0; t < NACC; t++)
        for (int i = 0; i < SUBN; i++)
          acc[t][i] <= acc[t][i] + (add1 ? delta1[t][i] : '0) + (add2 ? delta2[t][i] : '0);
    end
  end

endmodule
