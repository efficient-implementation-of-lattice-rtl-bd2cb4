// lbc_pm_top: the two lattice polynomial multipliers of this design, side by
// side. They solve different problems (different rings and moduli) and share
// nothing but clock and reset, so each keeps its own ports:
//   ks_*  KaratSaber, Saber multiplication in Z_{2^13}[x]/(x^256 + 1),
//         a with 13-bit coefficients, secret b in [-5, 5] (karatsaber_core);
//   sk_*  SPMA-Karatsuba (SK), R-LWE multiplication in Z_7681[x]/(x^256 + 1),
//         a < 7681, small b below 32 (sk_rlwe_core).
// The two cores may run at the same time. See the cores for the interface
// timing: both load their operands through write ports, start on a one-cycle
// pulse while idle, pulse done when the result memory is valid and read the
// result with a one-cycle read latency.
module lbc_pm_top
  import ks_pkg::subpoly_t, ks_pkg::bsub_t;
(
  input  logic        clk,
  input  logic        rst_n,
  // KaratSaber
  input  logic        ks_a_we,
  input  logic [3:0]  ks_a_addr,
  input  subpoly_t    ks_a_wdata,
  input  logic        ks_b_we,
  input  logic [3:0]  ks_b_addr,
  input  bsub_t       ks_b_wdata,
  input  logic        ks_start,
  output logic        ks_busy,
  output logic        ks_done,
  input  logic        ks_res_re,
  input  logic [3:0]  ks_res_addr,
  output subpoly_t    ks_res_rdata,
  output logic [15:0] ks_mult_cycles,
  output logic [15:0] ks_stall_cycles,
  // SK R-LWE multiplier
  input  logic        sk_a_we,
  input  logic [7:0]  sk_a_addr,
  input  logic [12:0] sk_a_wdata,
  input  logic        sk_b_we,
  input  logic [7:0]  sk_b_addr,
  input  logic [5:0]  sk_b_wdata,
  input  logic        sk_start,
  output logic        sk_busy,
  output logic        sk_done,
  input  logic        sk_res_re,
  input  logic [7:0]  sk_res_addr,
  output logic [12:0] sk_res_rdata,
  output logic [15:0] sk_cycles
);

  karatsaber_core u_ks (
    .clk, .rst_n,
    .a_we(ks_a_we), .a_addr(ks_a_addr), .a_wdata(ks_a_wdata),
    .b_we(ks_b_we), .b_addr(ks_b_addr), .b_wdata(ks_b_wdata),
    .start(ks_start), .busy(ks_busy), .done(ks_done),
    .res_re(ks_res_re), .res_addr(ks_res_addr), .res_rdata(ks_res_rdata),
    .mult_cycles(ks_mult_cycles), .stall_cycles(ks_stall_cycles)
  );

  sk_rlwe_core u_sk (
    .clk, .rst_n,
    .a_we(sk_a_we), .a_addr(sk_a_addr), .a_wdata(sk_a_wdata),
    .b_we(sk_b_we), .b_addr(sk_b_addr), .b_wdata(sk_b_wdata),
    .start(sk_start), .busy(sk_busy), .done(sk_done),
    .res_re(sk_res_re), .res_addr(sk_res_addr), .res_rdata(sk_res_rdata),
    .cycles(sk_cycles)
  );

endmodule
