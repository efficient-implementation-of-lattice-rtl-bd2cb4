// ks_preprocess: KaratSaber pre-process (parallel grid data input).
//
// Holds the two input polynomials as 16 top-layer sub-polynomials each
// (a: 16 x 16 x 13 bit, b: 16 x 16 x 4 bit) and nine reusable register sets
// R_1..R_9 that hold the Karatsuba sub-polynomials of a for one group of
// nine. A group is built from four group inputs g_0..g_3; the register sets
// hold g_0, g_1, g_0+g_1, g_2, g_3, g_2+g_3, g_0+g_2, g_1+g_3, g_0+..+g_3.
// A load op brings in one top-layer sub-polynomial a_w at group position m
// (the input decoder): every register set whose pattern contains m either
// adds a_w to what it holds, or, for the first position it holds in a group
// marked "new", is overwritten with a_w. Only polynomial a is pre-processed;
// b is used as top-layer sub-polynomials (partial multiplication).
//
// The selectors hand the two multipliers their operands: a register set and
// two top-layer b sub-polynomials each. They are combinational; the multiplier
// registers them. A register set may be read and reloaded in the same cycle:
// the read returns the old value.
//
// Loading: a_we/b_we write one 16-coefficient word per cycle (the 208-bit a
// and 64-bit b interfaces of the source design).
module ks_preprocess
  import ks_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // input buffers
  input  logic       a_we,
  input  logic [3:0] a_addr,
  input  subpoly_t   a_wdata,
  input  logic       b_we,
  input  logic [3:0] b_addr,
  input  bsub_t      b_wdata,
  // register-set load (input decoder)
  input  load_op_t   ld,
  // selectors for the two multipliers
  input  mult_op_t   op1,
  input  mult_op_t   op2,
  output subpoly_t   a_sel1,
  output bsub_t      b1_sel1,
  output bsub_t      b2_sel1,
  output subpoly_t   a_sel2,
  output bsub_t      b1_sel2,
  output bsub_t      b2_sel2
);

  subpoly_t abuf [NTOP];
  bsub_t    bbuf [NTOP];
  subpoly_t rset [NREG];

  always_ff @(posedge clk) begin
    if (a_we) abuf[a_addr] <= a_wdata;
    if (b_we) bbuf[b_addr] <= b_wdata;
  end

  // first (lowest) group position held by register set r
  function automatic logic [1:0] first_pos(int unsigned r);
    logic [3:0] mk;
    mk = reg_mask(r);
    return mk[0] ? 2'd0 : mk[1] ? 2'd1 : mk[2] ? 2'd2 : 2'd3;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) rset[r] <= '0;
    end else if (ld.valid) begin
      for (int r = 0; r < NREG; r++) begin
        if (reg_mask(r)[ld.pos]) begin
          if (ld.ovw && ld.pos == first_pos(r))
            rset[r] <= abuf[ld.word];
          else
            for (int i = 0; i < SUBN; i++) rset[r][i] <= rset[r][i] + abuf[ld.word][i];
        end
      end
    end
  end

  always_comb begin
    a_sel1  = rset[op1.rsel < 4'(NREG) ? op1.rsel : 4'd0];
    b1_sel1 = bbuf[op1.bsel1];
    b2_sel1 = bbuf[op1.bsel2];
    a_sel2  = rset[op2.rsel < 4'(NREG) ? op2.rsel : 4'd0];
    b1_sel2 = bbuf[op2.bsel1];
    b2_sel2 = bbuf[op2.bsel2];
  end

endmodule
