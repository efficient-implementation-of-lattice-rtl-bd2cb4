// ks_ctrl: control FSM of the KaratSaber multiplier.
//
// Walks two streams at once:
//  * the load stream: for each of the nine groups, the four (group 8: eight)
//    top-layer a sub-polynomials that build the group's nine register sets;
//  * the multiply stream: for each group and register set (in the order
//    R_1 R_2 R_3 R_4 R_7 R_8 R_9 R_5 R_6), the list of top-layer b
//    sub-polynomials the register set must be multiplied with, taken two at a
//    time (one STM array call); an odd list is padded with a zero multiplicand.
// Up to two multiply ops (one per STM array) and one load issue per cycle.
// Hazards are resolved by a small scoreboard instead of a fixed table:
//  * a multiply op of group g on register set r issues once every group
//    position that r holds has been loaded for g (a load is visible the cycle
//    after it is issued);
//  * a load of group g+1 at position m issues once every op of group g on a
//    register set holding m has issued (it may issue in the same cycle as the
//    last such read).
// This lets the pre-process of the next group overlap the multiplication of
// the current one, as in the source design's input sequence, without idle
// cycles beyond the ones the data dependencies force. The multiply stream
// needs 68 slots of two STM calls; the group order is fixed in ks_pkg.
//
// cycle_cnt (Counter 1) counts the cycles of the current/last operation from
// start to done. done pulses one cycle after the last accumulation.
module ks_ctrl
  import ks_pkg::*;
#(
  parameter int unsigned DRAIN = 1   // cycles from last issue until the last accumulation is visible
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic        clear,        // clear the accumulator bank
  output load_op_t    ld,
  output mult_op_t    op1,
  output mult_op_t    op2,
  output logic [15:0] cycle_cnt,
  output logic [15:0] stall_cnt     // cycles in which the multipliers were not both busy
);

  typedef struct packed {
    logic [3:0] g;    // group 0..9 (9 = end)
    logic [3:0] ri;   // index into reg_order
    logic [3:0] pi;   // pair index inside the register set's list
  } ptr_t;

  typedef struct packed {
    mult_op_t   op;
    logic [3:0] r;
    logic       last; // last pair of this register set in its group
  } desc_t;

  function automatic int unsigned log2q(logic [3:0] qm);
    int unsigned n;
    n = popcnt4(qm);
    return (n == 4) ? 2 : (n == 2) ? 1 : 0;
  endfunction

  function automatic desc_t describe(ptr_t p);
    desc_t d;
    int unsigned r, lq, nel, e1, e2;
    logic [3:0] mk, qm;
    d = '0;
    r  = reg_order(32'(p.ri));
    mk = reg_mask(r);
    qm = grp_qmask(32'(p.g));
    lq = log2q(qm);
    nel = popcnt4(mk) << lq;
    e1 = 2 * p.pi;
    e2 = e1 + 1;
    d.r = 4'(r);
    d.op.valid  = (p.g < 4'(NGRP));
    d.op.rsel   = 4'(r);
    d.op.bsel1  = 4'(nth_bit(mk, e1 >> lq) + 4 * nth_bit(qm, e1 & ((1 << lq) - 1)));
    d.op.b2_zero = (e2 >= nel);
    d.op.bsel2  = d.op.b2_zero ? 4'd0 :
                  4'(nth_bit(mk, e2 >> lq) + 4 * nth_bit(qm, e2 & ((1 << lq) - 1)));
    d.op.sub    = 7'(grp_sub(32'(p.g), r));
    d.last      = (e2 + 1 >= nel);
    return d;
  endfunction

  function automatic ptr_t succ(ptr_t p, logic last);
    ptr_t n;
    n = p;
    if (p.g >= 4'(NGRP)) return p;
    if (!last) n.pi = p.pi + 1;
    else begin
      n.pi = '0;
      if (p.ri == 4'(NREG - 1)) begin
        n.ri = '0;
        n.g  = p.g + 1;
      end else n.ri = p.ri + 1;
    end
    return n;
  endfunction

  // state
  ptr_t       ptr;
  logic [3:0] gl;       // group being loaded (9 = all loaded)
  logic [2:0] li;       // load index inside the group
  logic [3:0] lmask;    // positions fully loaded for group gl
  logic [NREG-1:0] rdone;  // register sets whose ops of group ptr.g have all issued
  logic [3:0] drain;

  // combinational issue logic
  desc_t dA, dB;
  ptr_t  pB, ptr_nxt;
  logic  rdyA, rdyB, issA, issB, ld_ok;
  logic [NREG-1:0] done_now, rdone_nxt;
  logic [1:0] lpos;
  logic       lpass;

  function automatic logic ready(desc_t d, logic [3:0] g, logic [3:0] gload, logic [3:0] lm);
    logic [3:0] mk;
    mk = reg_mask(32'(d.r));
    if (g >= 4'(NGRP)) return 1'b0;
    if (g < gload) return 1'b1;
    return (g == gload) && ((lm & mk) == mk);
  endfunction

  always_comb begin
    dA   = describe(ptr);
    pB   = succ(ptr, dA.last);
    dB   = describe(pB);
    rdyA = ready(dA, ptr.g, gl, lmask);
    rdyB = ready(dB, pB.g, gl, lmask);
    issA = busy && rdyA;
    issB = issA && rdyB;
    ptr_nxt = issB ? succ(pB, dB.last) : issA ? pB : ptr;

    done_now = rdone;
    if (issA && dA.last) done_now[dA.r] = 1'b1;
    if (issB && dB.last && pB.g == ptr.g) done_now[dB.r] = 1'b1;
    if (ptr_nxt.g != ptr.g) begin
      rdone_nxt = '0;
      if (issB && dB.last && pB.g == ptr_nxt.g) rdone_nxt[dB.r] = 1'b1;
    end else rdone_nxt = done_now;

    lpos  = li[1:0];
    lpass = li[2];
    ld_ok = busy && (gl < 4'(NGRP));
    if (ld_ok && gl != 0) begin
      if (gl - 1 > ptr.g) ld_ok = 1'b0;
      else if (gl - 1 == ptr.g) begin
        for (int r = 0; r < NREG; r++)
          if (reg_mask(r)[lpos] && !done_now[r]) ld_ok = 1'b0;
      end
    end

    ld       = '0;
    ld.valid = ld_ok;
    ld.pos   = lpos;
    ld.word  = grp_base(32'(gl), 32'(lpass)) + 4'(lpos);
    ld.ovw   = grp_new(32'(gl));

    op1 = dA.op;
    op1.valid = issA;
    op2 = dB.op;
    op2.valid = issB;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      clear     <= 1'b0;
      ptr       <= '0;
      gl        <= '0;
      li        <= '0;
      lmask     <= '0;
      rdone     <= '0;
      drain     <= '0;
      cycle_cnt <= '0;
      stall_cnt <= '0;
    end else begin
      done  <= 1'b0;
      clear <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy      <= 1'b1;
          clear     <= 1'b1;
          ptr       <= '0;
          gl        <= '0;
          li        <= '0;
          lmask     <= '0;
          rdone     <= '0;
          drain     <= 4'(DRAIN);
          cycle_cnt <= 16'd1;
          stall_cnt <= '0;
        end
      end else begin
        cycle_cnt <= cycle_cnt + 1;
        if (ptr.g < 4'(NGRP) && !issB) stall_cnt <= stall_cnt + 1;
        ptr   <= ptr_nxt;
        rdone <= rdone_nxt;
        if (ld_ok) begin
          if (32'(li) == grp_nloads(32'(gl)) - 1) begin
            gl    <= gl + 1;
            li    <= '0;
            lmask <= '0;
          end else begin
            li <= li + 1;
            if (32'(li) >= grp_nloads(32'(gl)) - 4) lmask[lpos] <= 1'b1;
          end
        end
        if (ptr.g >= 4'(NGRP)) begin
          if (drain == 0) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else drain <= drain - 1;
        end
      end
    end
  end

endmodule
