// sk_rlwe_core: SPMA-Karatsuba (SK) polynomial multiplier for R-LWE,
// c = a * b in Z_7681[x]/(x^256 + 1).
//
// One Karatsuba layer splits both operands into halves; the three half-size
// products are computed by schoolbook multiplication in three parallel DSP
// lanes (sk), and the recombination is fused with the negacyclic reduction
// (k_combi_nega). The stages run one after the other:
//   karatsuba 1_1 + prep_input (k_split_prep)  256 cycles
//   spma (sk_spma_seq + sk)                    64 x 129 cycles + pipeline
//   karatsuba 1_2 + negacyclic (k_combi_nega)  256 cycles + pipeline
// Memories (sk_bram, two read ports each): input a and b, a_mid, b_mid, the
// b_low copy, ab_low, ab_high, ab_mid, and the result.
//
// Operands: a coefficients < 7681 (13 bits). b coefficients are small
// non-negative integers below 32, so that b_low + b_high fits the 6-bit DSP
// field (this design's choice: the source gives the 6-bit field width but not
// the encoding of negative error values).
//
// Interface: write a[i] / b[i] one coefficient per cycle (a_we/b_we), pulse
// start while idle, wait for done, read result coefficient res_addr with
// res_re (data one cycle later). cycles counts start to done.
module sk_rlwe_core
  import sk_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        a_we,
  input  logic [7:0]  a_addr,
  input  coef_t       a_wdata,
  input  logic        b_we,
  input  logic [7:0]  b_addr,
  input  bcoef_t      b_wdata,
  input  logic        start,
  output logic        busy,
  output logic        done,
  input  logic        res_re,
  input  logic [7:0]  res_addr,
  output coef_t       res_rdata,
  output logic [15:0] cycles
);

  typedef enum logic [1:0] {P_IDLE, P_SPLIT, P_SPMA, P_COMBI} phase_t;
  phase_t phase;

  // stage handshakes
  logic sp_start, sp_busy, sp_done, sp_prep;
  logic sq_start, sq_busy, sq_done;
  logic cn_start, cn_busy, cn_done;

  // k_split_prep ports
  logic       sp_re;
  logic [7:0] sp_addr0, sp_addr1;
  logic       amid_we, bmid_we, blow_we;
  logic [6:0] amid_waddr, bmid_waddr, blow_waddr;
  coef_t      amid_wdata;
  bcoef_t     bmid_wdata, blow_wdata;

  // spma sequencer ports
  logic       sq_rd, sq_bre, sq_op, sq_first, sq_last, sq_stack, sq_stre, sq_we;
  logic [6:0] sq_aidx;
  logic [5:0] sq_pair;
  logic [7:0] sq_staddr, sq_waddr;

  // combination ports
  logic       cn_re, res_we;
  logic [7:0] cn_addr_i, cn_addr_j, res_waddr;
  coef_t      res_wdata;

  // memory data
  coef_t  a_rd0, a_rd1, amid_rd0, amid_rd1;
  bcoef_t b_rd0, b_rd1, bmid_rd0, bmid_rd1, blow_rd0, blow_rd1;
  coef_t  abl_rd0, abl_rd1, abh_rd0, abh_rd1, abm_rd0, abm_rd1, res_rd1;
  coef_t  ab_low, ab_high, ab_mid;
  logic   sk_valid;

  logic in_spma;
  assign in_spma = (phase == P_SPMA);

  // ---------------- stage sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= P_IDLE;
      done     <= 1'b0;
      sp_start <= 1'b0;
      sq_start <= 1'b0;
      cn_start <= 1'b0;
      cycles   <= '0;
    end else begin
      done     <= 1'b0;
      sp_start <= 1'b0;
      sq_start <= 1'b0;
      cn_start <= 1'b0;
      if (phase != P_IDLE) cycles <= cycles + 1;
      case (phase)
        P_IDLE:  if (start) begin phase <= P_SPLIT; sp_start <= 1'b1; cycles <= 16'd1; end
        P_SPLIT: if (sp_done) begin phase <= P_SPMA; sq_start <= 1'b1; end
        P_SPMA:  if (sq_done) begin phase <= P_COMBI; cn_start <= 1'b1; end
        P_COMBI: if (cn_done) begin phase <= P_IDLE; done <= 1'b1; end
        default: phase <= P_IDLE;
      endcase
    end
  end

  assign busy = (phase != P_IDLE);

  k_split_prep u_split (
    .clk, .rst_n, .start(sp_start), .busy(sp_busy), .done(sp_done), .stage_prep(sp_prep),
    .rd_re(sp_re), .rd_addr0(sp_addr0), .rd_addr1(sp_addr1),
    .a_rdata0(a_rd0), .a_rdata1(a_rd1), .b_rdata0(b_rd0), .b_rdata1(b_rd1),
    .amid_we, .amid_waddr, .amid_wdata, .bmid_we, .bmid_waddr, .bmid_wdata,
    .blow_we, .blow_waddr, .blow_wdata
  );

  sk_spma_seq u_seq (
    .clk, .rst_n, .start(sq_start), .busy(sq_busy), .done(sq_done),
    .rd_valid(sq_rd), .a_idx(sq_aidx), .b_re(sq_bre), .b_pair(sq_pair),
    .op_valid(sq_op), .first(sq_first), .last(sq_last), .stack_en(sq_stack),
    .st_re(sq_stre), .st_addr(sq_staddr), .wr_en(sq_we), .wr_addr(sq_waddr)
  );

  k_combi_nega u_combi (
    .clk, .rst_n, .start(cn_start), .busy(cn_busy), .done(cn_done),
    .rd_re(cn_re), .rd_addr_i(cn_addr_i), .rd_addr_j(cn_addr_j),
    .low_i(abl_rd0), .high_i(abh_rd0), .low_j(abl_rd1), .high_j(abh_rd1), .mid_j(abm_rd1),
    .res_we, .res_waddr, .res_wdata
  );

  // ---------------- memories ----------------
  // input a: port 0 = a[i] (a_low), port 1 = a[128+i] (a_high)
  sk_bram #(.DEPTH(N), .WIDTH(W)) u_a_mem (
    .clk, .we(a_we && !busy), .waddr(a_addr), .wdata(a_wdata),
    .re0(in_spma ? sq_rd : sp_re), .raddr0(in_spma ? {1'b0, sq_aidx} : sp_addr0), .rdata0(a_rd0),
    .re1(in_spma ? sq_rd : sp_re), .raddr1(in_spma ? {1'b1, sq_aidx} : sp_addr1), .rdata1(a_rd1)
  );

  // input b: split/prep read b[i], b[128+i]; spma reads the b_high pair
  sk_bram #(.DEPTH(N), .WIDTH(BW)) u_b_mem (
    .clk, .we(b_we && !busy), .waddr(b_addr), .wdata(b_wdata),
    .re0(in_spma ? sq_bre : sp_re), .raddr0(in_spma ? {1'b1, sq_pair, 1'b0} : sp_addr0), .rdata0(b_rd0),
    .re1(in_spma ? sq_bre : sp_re), .raddr1(in_spma ? {1'b1, sq_pair, 1'b1} : sp_addr1), .rdata1(b_rd1)
  );

  sk_bram #(.DEPTH(HALF), .WIDTH(W)) u_amid_mem (
    .clk, .we(amid_we), .waddr(amid_waddr), .wdata(amid_wdata),
    .re0(sq_rd), .raddr0(sq_aidx), .rdata0(amid_rd0),
    .re1(1'b0), .raddr1('0), .rdata1(amid_rd1)
  );

  sk_bram #(.DEPTH(HALF), .WIDTH(BW)) u_bmid_mem (
    .clk, .we(bmid_we), .waddr(bmid_waddr), .wdata(bmid_wdata),
    .re0(sq_bre), .raddr0({sq_pair, 1'b0}), .rdata0(bmid_rd0),
    .re1(sq_bre), .raddr1({sq_pair, 1'b1}), .rdata1(bmid_rd1)
  );

  sk_bram #(.DEPTH(HALF), .WIDTH(BW)) u_blow_mem (
    .clk, .we(blow_we), .waddr(blow_waddr), .wdata(blow_wdata),
    .re0(sq_bre), .raddr0({sq_pair, 1'b0}), .rdata0(blow_rd0),
    .re1(sq_bre), .raddr1({sq_pair, 1'b1}), .rdata1(blow_rd1)
  );

  // half products: port 0 = partial-sum read (spma) or index i (combination),
  // port 1 = index j (combination)
  sk_bram #(.DEPTH(N), .WIDTH(W)) u_ablow_mem (
    .clk, .we(sq_we), .waddr(sq_waddr), .wdata(ab_low),
    .re0(in_spma ? sq_stre : cn_re), .raddr0(in_spma ? sq_staddr : cn_addr_i), .rdata0(abl_rd0),
    .re1(cn_re), .raddr1(cn_addr_j), .rdata1(abl_rd1)
  );
  sk_bram #(.DEPTH(N), .WIDTH(W)) u_abhigh_mem (
    .clk, .we(sq_we), .waddr(sq_waddr), .wdata(ab_high),
    .re0(in_spma ? sq_stre : cn_re), .raddr0(in_spma ? sq_staddr : cn_addr_i), .rdata0(abh_rd0),
    .re1(cn_re), .raddr1(cn_addr_j), .rdata1(abh_rd1)
  );
  sk_bram #(.DEPTH(N), .WIDTH(W)) u_abmid_mem (
    .clk, .we(sq_we), .waddr(sq_waddr), .wdata(ab_mid),
    .re0(sq_stre), .raddr0(sq_staddr), .rdata0(abm_rd0),
    .re1(cn_re), .raddr1(cn_addr_j), .rdata1(abm_rd1)
  );

  sk_bram #(.DEPTH(N), .WIDTH(W)) u_res_mem (
    .clk, .we(res_we), .waddr(res_waddr), .wdata(res_wdata),
    .re0(res_re), .raddr0(res_addr), .rdata0(res_rdata),
    .re1(1'b0), .raddr1('0), .rdata1(res_rd1)
  );

  // ---------------- three DSP lanes ----------------
  sk u_sk (
    .clk, .rst_n, .in_valid(sq_op), .first(sq_first), .last(sq_last), .stack_en(sq_stack),
    .a_low(a_rd0), .a_high(a_rd1), .a_mid(amid_rd0),
    .b_lowE(blow_rd0), .b_highE(b_rd0), .b_midE(bmid_rd0),
    .b_lowO(blow_rd1), .b_highO(b_rd1), .b_midO(bmid_rd1),
    .inStack_l(abl_rd0), .inStack_h(abh_rd0), .inStack_m(abm_rd0),
    .out_valid(sk_valid), .ab_low, .ab_high, .ab_mid
  );

endmodule
