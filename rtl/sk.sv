// sk: the spma sub-module of the SK R-LWE multiplier: three DSP lanes that
// compute the three half-size Karatsuba products ab_low = a_low*b_low,
// ab_high = a_high*b_high and ab_mid = a_mid*b_mid (each 128 x 128
// coefficients, 255-coefficient linear result, mod q) in the same loop.
// Every lane pairs one coefficient of its a half with an even/odd pair of its
// b half (see sk_lane), so the module performs six multiplications per cycle
// with three DSP multipliers, and reads back / writes one partial sum per lane
// per cycle.
//
// Timing: as sk_lane. All lanes share in_valid and the loop flags; each lane
// has its own operands, partial sum input and result.
module sk
  import sk_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   first,
  input  logic   last,
  input  logic   stack_en,
  input  coef_t  a_low,  a_high,  a_mid,
  input  bcoef_t b_lowE, b_highE, b_midE,
  input  bcoef_t b_lowO, b_highO, b_midO,
  input  coef_t  inStack_l, inStack_h, inStack_m,
  output logic   out_valid,
  output coef_t  ab_low, ab_high, ab_mid
);

  logic v_l, v_h, v_m;

  sk_lane u_low (
    .clk, .rst_n, .in_valid, .a(a_low), .b_e(b_lowE), .b_o(b_lowO), .first, .last,
    .stack_en, .in_stack(inStack_l), .out_valid(v_l), .ab(ab_low)
  );
  sk_lane u_high (
    .clk, .rst_n, .in_valid, .a(a_high), .b_e(b_highE), .b_o(b_highO), .first, .last,
    .stack_en, .in_stack(inStack_h), .out_valid(v_h), .ab(ab_high)
  );
  sk_lane u_mid (
    .clk, .rst_n, .in_valid, .a(a_mid), .b_e(b_midE), .b_o(b_midO), .first, .last,
    .stack_en, .in_stack(inStack_m), .out_valid(v_m), .ab(ab_mid)
  );

  assign out_valid = v_l & v_h & v_m;

endmodule
