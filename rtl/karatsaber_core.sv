// karatsaber_core: KaratSaber polynomial multiplier for Saber,
// c = a * b in Z_{2^13}[x]/(x^256 + 1), a with 13-bit coefficients,
// b a secret with coefficients in [-5, 5].
//
// Structure (after the source design's top-level block diagram):
//   pre-process  : input buffers, input decoder, nine reusable register sets
//                  holding Karatsuba sub-polynomials of a, selectors
//   multiplication: two arrays of 256 STM units (ks_mult), each computing one
//                  16x16 sub-polynomial product with two b multiplicands
//   post-process : two code-based mappers (ks_postprocess) whose outputs are
//                  added into the accumulator sets acc_0..acc_15 (ks_acc_bank)
//   control      : ks_ctrl, which overlaps the loading of the register sets
//                  with the multiplications
//   result MEM   : ks_result_mem, filled from the accumulators after the
//                  multiplication, one 16-coefficient word per cycle
//
// Interface:
//   a_we/a_addr/a_wdata : write top-layer word a_i (coefficients 16i..16i+15,
//                         coefficient j in bits 13j+12:13j), 208 bits
//   b_we/b_addr/b_wdata : same for b, 4 bits per coefficient, {sign, magnitude};
//                         writes of a and b are ignored while busy
//   start               : one-cycle pulse while idle; a and b must be loaded
//   done                : one-cycle pulse when the result memory is filled
//   res_re/res_addr     : read word t of the result, res_rdata one cycle later
//   mult_cycles         : cycles from start until the accumulators were final
// Loading a and b takes 16 cycles (both in parallel) and is not counted.
module karatsaber_core
  import ks_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        a_we,
  input  logic [3:0]  a_addr,
  input  subpoly_t    a_wdata,
  input  logic        b_we,
  input  logic [3:0]  b_addr,
  input  bsub_t       b_wdata,
  input  logic        start,
  output logic        busy,
  output logic        done,
  input  logic        res_re,
  input  logic [3:0]  res_addr,
  output subpoly_t    res_rdata,
  output logic [15:0] mult_cycles,
  output logic [15:0] stall_cycles
);

  load_op_t ld;
  mult_op_t op1, op2;
  logic     ctl_busy, ctl_done, clear;
  subpoly_t a_sel1, a_sel2;
  bsub_t    b1_sel1, b2_sel1, b1_sel2, b2_sel2;
  logic     v1, v2;
  prod_t    p1, p2;
  logic [6:0] s1, s2;
  subpoly_t d1 [NACC];
  subpoly_t d2 [NACC];
  map_code_t c1 [NACC];
  map_code_t c2 [NACC];
  subpoly_t acc [NACC];
  logic     copying;
  logic [3:0] copy_idx;

  ks_ctrl u_ctrl (
    .clk, .rst_n, .start(start && !busy), .busy(ctl_busy), .done(ctl_done), .clear,
    .ld, .op1, .op2, .cycle_cnt(mult_cycles), .stall_cnt(stall_cycles)
  );

  ks_preprocess u_pre (
    .clk, .rst_n,
    .a_we(a_we && !busy), .a_addr, .a_wdata, .b_we(b_we && !busy), .b_addr, .b_wdata,
    .ld, .op1, .op2,
    .a_sel1, .b1_sel1, .b2_sel1, .a_sel2, .b1_sel2, .b2_sel2
  );

  ks_mult u_mult1 (
    .clk, .rst_n, .in_valid(op1.valid), .a_in(a_sel1), .b1_in(b1_sel1), .b2_in(b2_sel1),
    .b2_zero(op1.b2_zero), .sub_in(op1.sub), .out_valid(v1), .prod(p1), .sub_out(s1)
  );

  ks_mult u_mult2 (
    .clk, .rst_n, .in_valid(op2.valid), .a_in(a_sel2), .b1_in(b1_sel2), .b2_in(b2_sel2),
    .b2_zero(op2.b2_zero), .sub_in(op2.sub), .out_valid(v2), .prod(p2), .sub_out(s2)
  );

  ks_postprocess u_post1 (.in_valid(v1), .prod(p1), .sub(s1), .delta(d1), .codes(c1));
  ks_postprocess u_post2 (.in_valid(v2), .prod(p2), .sub(s2), .delta(d2), .codes(c2));

  ks_acc_bank u_acc (
    .clk, .rst_n, .clear, .add1(v1), .delta1(d1), .add2(v2), .delta2(d2), .acc
  );

  // copy the accumulator sets into the result memory
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      copying  <= 1'b0;
      copy_idx <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (ctl_done) begin
        copying  <= 1'b1;
        copy_idx <= '0;
      end else if (copying) begin
        copy_idx <= copy_idx + 1;
        if (copy_idx == 4'(NACC - 1)) begin
          copying <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  assign busy = ctl_busy || ctl_done || copying;

  ks_result_mem u_res (
    .clk, .we(copying), .waddr(copy_idx), .wdata(acc[copy_idx]),
    .re(res_re), .raddr(res_addr), .rdata(res_rdata)
  );

endmodule
