// ks_pkg: constants, types and elaboration-time functions shared by the
// KaratSaber polynomial multiplier (4-layer Karatsuba over Z_{2^13}[x]/(x^256+1)).
//
// Polynomial a (the public, 13-bit operand) is cut into 16 top-layer
// sub-polynomials a_0..a_15 of 16 coefficients. Four Karatsuba layers then give
// 81 sub-polynomials; sub-polynomial k (0..80) is named by four base-3 digits
// k = 27*D3 + 9*D2 + 3*D1 + D0. D0..D2 count L(low), H(high), M(middle = low+high)
// in that order; the top digit D3 counts L, M, H. This numbering follows the
// register tables of the source design (R_1 = a_0, R_3 = a_0+a_1,
// R_27 = a_0+...+a_7, R_37 = a_4+a_12, R_52 = a_0+a_2+...+a_14).
//
// Each sub-polynomial product is mapped onto the 16 accumulator sets by an
// instruction code (Table "code-based transformation"):
//   0 nop, 1 +R_L, 2 +R_H, 3 -R_L, 4 -R_H, 5 +R_H+R_L, 6 +R_H-R_L,
//   7 -R_H+R_L, 8 -R_H-R_L
// The codes are not stored as a pasted table: map_code() derives them from
// the Karatsuba recombination factors, per layer (h = 8,4,2,1 blocks of 16):
//   L -> (1 - y^h),  H -> (y^2h - y^h),  M -> y^h,   with y = x^16,
// multiplied together, times (R_L + y R_H), reduced modulo y^16 + 1.
package ks_pkg;

  localparam int unsigned N      = 256;  // polynomial degree
  localparam int unsigned QBITS  = 13;   // log2 q, q = 8192
  localparam int unsigned BBITS  = 4;    // secret coefficient width (sign-magnitude)
  localparam int unsigned SUBN   = 16;   // coefficients per sub-polynomial
  localparam int unsigned NTOP   = 16;   // top-layer sub-polynomials
  localparam int unsigned NSUB   = 81;   // 3^4 sub-polynomials
  localparam int unsigned NREG   = 9;    // reusable register sets
  localparam int unsigned NGRP   = 9;    // groups of nine sub-polynomials
  localparam int unsigned NACC   = 16;   // accumulator sets acc_0..acc_15

  typedef logic [QBITS-1:0] coef_t;
  typedef logic [BBITS-1:0] bcoef_t;      // {sign, magnitude[2:0]}, |value| <= 5
  typedef coef_t  [SUBN-1:0]   subpoly_t; // 16 coefficients of a
  typedef bcoef_t [SUBN-1:0]   bsub_t;    // 16 coefficients of b
  typedef coef_t  [2*SUBN-1:0] prod_t;    // 31-coefficient product, MSB coefficient 0

  typedef enum logic [3:0] {
    C_NOP = 4'd0, C_PL = 4'd1, C_PH = 4'd2, C_ML = 4'd3, C_MH = 4'd4,
    C_PH_PL = 4'd5, C_PH_ML = 4'd6, C_MH_PL = 4'd7, C_MH_ML = 4'd8
  } map_code_t;

  // One multiplication issued to an STM array: register set, two top-layer b
  // indices (b2 may be absent), and the sub-polynomial number for the mapper.
  typedef struct packed {
    logic       valid;
    logic [3:0] rsel;     // register set 0..8
    logic [3:0] bsel1;    // top-layer b index
    logic [3:0] bsel2;
    logic       b2_zero;  // second multiplicand is 0
    logic [6:0] sub;      // sub-polynomial 0..80
  } mult_op_t;

  // One top-layer a load into the register sets.
  typedef struct packed {
    logic       valid;
    logic [3:0] word;     // top-layer index of a
    logic [1:0] pos;      // position m inside the group (0..3)
    logic       ovw;      // first write of a register in this group overwrites
  } load_op_t;

  // Digit of layer lvl (0 = finest) normalised to 0 = L, 1 = H, 2 = M.
  function automatic int unsigned sub_digit(int unsigned k, int unsigned lvl);
    int unsigned d;
    d = (k / (3 ** lvl)) % 3;
    if (lvl == 3) d = (d == 1) ? 2 : (d == 2) ? 1 : 0;
    return d;
  endfunction

  // Mapping code of sub-polynomial k on accumulator set t.
  function automatic map_code_t map_code(int unsigned k, int unsigned t);
    int c [32];
    int n [32];
    int r [16];
    int h, d, cl, ch;
    for (int e = 0; e < 32; e++) c[e] = 0;
    c[0] = 1;
    for (int lvl = 0; lvl < 4; lvl++) begin
      h = 1 << lvl;
      d = int'(sub_digit(k, lvl));
      for (int e = 0; e < 32; e++) n[e] = 0;
      for (int e = 0; e < 16; e++) begin
        if (c[e] != 0) begin
          if (d == 0) begin
            n[e] += c[e];
            n[e+h] -= c[e];
          end else if (d == 1) begin
            n[e+2*h] += c[e];
            n[e+h] -= c[e];
          end else begin
            n[e+h] += c[e];
          end
        end
      end
      for (int e = 0; e < 32; e++) c[e] = n[e];
    end
    for (int e = 0; e < 16; e++) r[e] = c[e] - c[e+16];
    cl = r[t];
    ch = (t == 0) ? -r[15] : r[t-1];
    if (cl == 1 && ch == 0)   return C_PL;
    if (cl == 0 && ch == 1)   return C_PH;
    if (cl == -1 && ch == 0)  return C_ML;
    if (cl == 0 && ch == -1)  return C_MH;
    if (cl == 1 && ch == 1)   return C_PH_PL;
    if (cl == -1 && ch == 1)  return C_PH_ML;
    if (cl == 1 && ch == -1)  return C_MH_PL;
    if (cl == -1 && ch == -1) return C_MH_ML;
    return C_NOP;
  endfunction

  // Positions m (bit mask over 0..3) of the group inputs that register set r holds.
  function automatic logic [3:0] reg_mask(int unsigned r);
    logic [1:0] m0, m1;
    logic [3:0] mk;
    m0 = (r % 3 == 0) ? 2'b01 : (r % 3 == 1) ? 2'b10 : 2'b11;   // D0
    m1 = (r / 3 == 0) ? 2'b01 : (r / 3 == 1) ? 2'b10 : 2'b11;   // D1
    mk = '0;
    for (int p = 0; p < 4; p++) mk[p] = m0[p%2] & m1[p/2];
    return mk;
  endfunction

  // Group schedule. Group g holds the nine sub-polynomials that share digits
  // (D3, D2). Group order and load mode follow the input sequence
  // a_0-3 (new), +a_4-7, a_4-7 (new), +a_12-15, then continue by symmetry.
  //   g : (D3,D2)  loads                    top-layer offsets q (index = m+4q)
  //   0 : (L,L)    new a_0..3               {0}
  //   1 : (L,M)    +a_4..7                  {0,1}
  //   2 : (L,H)    new a_4..7               {1}
  //   3 : (M,H)    +a_12..15                {1,3}
  //   4 : (H,H)    new a_12..15             {3}
  //   5 : (H,M)    +a_8..11                 {2,3}
  //   6 : (H,L)    new a_8..11              {2}
  //   7 : (M,L)    +a_0..3                  {0,2}
  //   8 : (M,M)    +a_4..7, +a_12..15       {0,1,2,3}
  function automatic logic [3:0] grp_qmask(int unsigned g);
    case (g)
      0: return 4'b0001;  1: return 4'b0011;  2: return 4'b0010;
      3: return 4'b1010;  4: return 4'b1000;  5: return 4'b1100;
      6: return 4'b0100;  7: return 4'b0101;  default: return 4'b1111;
    endcase
  endfunction

  function automatic int unsigned grp_nloads(int unsigned g);
    return (g == 8) ? 8 : 4;
  endfunction

  // Base top-layer index of load pass p (0 or 1) of group g.
  function automatic logic [3:0] grp_base(int unsigned g, int unsigned p);
    case (g)
      0: return 4'd0;  1: return 4'd4;  2: return 4'd4;  3: return 4'd12;
      4: return 4'd12; 5: return 4'd8;  6: return 4'd8;  7: return 4'd0;
      default: return (p == 0) ? 4'd4 : 4'd12;
    endcase
  endfunction

  function automatic logic grp_new(int unsigned g);
    return (g % 2 == 0) && (g != 8);
  endfunction

  // Sub-polynomial number of register set r in group g.
  function automatic int unsigned grp_sub(int unsigned g, int unsigned r);
    int unsigned d3, d2;
    case (g)
      0: begin d3 = 0; d2 = 0; end
      1: begin d3 = 0; d2 = 2; end
      2: begin d3 = 0; d2 = 1; end
      3: begin d3 = 1; d2 = 1; end
      4: begin d3 = 2; d2 = 1; end
      5: begin d3 = 2; d2 = 2; end
      6: begin d3 = 2; d2 = 0; end
      7: begin d3 = 1; d2 = 0; end
      default: begin d3 = 1; d2 = 2; end
    endcase
    return 27*d3 + 9*d2 + r;
  endfunction

  // Order in which the register sets of a group are multiplied: R_5 and R_6
  // (which hold only the last two group inputs) go last so that the next
  // group may start overwriting the first inputs early.
  function automatic int unsigned reg_order(int unsigned i);
    case (i)
      0: return 0; 1: return 1; 2: return 2; 3: return 3; 4: return 6;
      5: return 7; 6: return 8; 7: return 4; default: return 5;
    endcase
  endfunction

  function automatic int unsigned popcnt4(logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  // k-th set bit (0-based) of a 4-bit mask.
  function automatic int unsigned nth_bit(logic [3:0] v, int unsigned k);
    int unsigned cnt;
    cnt = 0;
    for (int p = 0; p < 4; p++) begin
      if (v[p]) begin
        if (cnt == k) return p;
        cnt++;
      end
    end
    return 0;
  endfunction

endpackage
