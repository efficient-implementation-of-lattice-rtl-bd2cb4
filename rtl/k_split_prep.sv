// k_split_prep: first two stages of the SK multiplier.
//
// karatsuba 1_1 (128 cycles): for i = 0..127 reads a[i], a[128+i], b[i],
//   b[128+i] through the two read ports of the input memories and writes
//     a_mid[i] = (a_low[i] + a_high[i]) mod q,  b_mid[i] = b_low[i] + b_high[i]
//   (b is small, so b_mid is a plain sum and needs the sixth bit).
// prep_input (128 cycles): copies b_low into its own memory, so that in the
//   spma stage the low and the high lane can each read a b pair through two
//   read ports at once without sharing the input b memory.
//
// Timing: reads are issued at cycle t and written back at t+1; done pulses
// one cycle after the last write of prep_input. Memory reads are registered
// (sk_bram), so write enables and addresses are delayed by one cycle here.
// By construction the b_low copy is the b read data passed on unchanged, and
// bit 7 of the two read addresses is fixed (0 for the low half, 1 for the
// high half).
module k_split_prep
  import sk_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic       stage_prep,     // high during prep_input
  // input memories (two read ports each)
  output logic       rd_re,
  output logic [7:0] rd_addr0,       // i
  output logic [7:0] rd_addr1,       // 128 + i
  input  coef_t      a_rdata0,
  input  coef_t      a_rdata1,
  input  bcoef_t     b_rdata0,
  input  bcoef_t     b_rdata1,
  // outputs
  output logic       amid_we,
  output logic [6:0] amid_waddr,
  output coef_t      amid_wdata,
  output logic       bmid_we,
  output logic [6:0] bmid_waddr,
  output bcoef_t     bmid_wdata,
  output logic       blow_we,
  output logic [6:0] blow_waddr,
  output bcoef_t     blow_wdata
);

  typedef enum logic [1:0] {S_IDLE, S_SPLIT, S_PREP} state_t;
  state_t     st;
  logic [6:0] i;
  logic       v_q, prep_q, last_q;
  logic [6:0] i_q;

  assign busy       = (st != S_IDLE) || v_q;
  assign stage_prep = (st == S_PREP);
  assign rd_re      = (st != S_IDLE);
  assign rd_addr0   = {1'b0, i};
  assign rd_addr1   = {1'b1, i};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      i      <= '0;
      v_q    <= 1'b0;
      prep_q <= 1'b0;
      last_q <= 1'b0;
      i_q    <= '0;
      done   <= 1'b0;
    end else begin
      v_q    <= (st != S_IDLE);
      prep_q <= (st == S_PREP);
      last_q <= (st == S_PREP) && (i == 7'(HALF - 1));
      i_q    <= i;
      done   <= last_q;
      case (st)
        S_IDLE:  if (start && !v_q) begin st <= S_SPLIT; i <= '0; end
        S_SPLIT: begin
          i <= i + 1;
          if (i == 7'(HALF - 1)) st <= S_PREP;
        end
        S_PREP: begin
          i <= i + 1;
          if (i == 7'(HALF - 1)) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign amid_we    = v_q && !prep_q;
  assign amid_waddr = i_q;
  assign amid_wdata = mod_add(a_rdata0, a_rdata1);
  assign bmid_we    = v_q && !prep_q;
  assign bmid_waddr = i_q;
  assign bmid_wdata = b_rdata0 + b_rdata1;
  assign blow_we    = v_q && prep_q;
  assign blow_waddr = i_q;
  assign blow_wdata = b_rdata0;

endmodule
