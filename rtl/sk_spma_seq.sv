// sk_spma_seq: loop sequencer of the spma stage of the SK multiplier.
//
// Outer loop over the 64 even/odd multiplicand pairs k (b[2k], b[2k+1]) of
// each half, inner loop over the 128 coefficients i of a plus one flush step
// (i = 128). Step (k, i) contributes to result coefficient c = i + 2k. Per
// step the sequencer drives, each aligned to its consumer:
//   cycle t   : memory reads  a[i] (a_idx), b pair k (b_re only at i = 0:
//               the pair stays on the memory outputs for the whole pass)
//   cycle t+1 : lane operands valid, first (i = 0), last (i = 128),
//               stack_en, and the read of the partial sum ab[c] (st_*)
//   cycle t+3 : write of the updated partial sum ab[c] (wr_*)
// stack_en is low where c is touched for the first time (k = 0, or
// c > 2k + 126, beyond the range of the previous pass), so the never-cleared
// product memories need no initialisation.
// 64 x 129 = 8256 issue cycles; done pulses after the last write.
module sk_spma_seq
  import sk_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  // cycle t
  output logic       rd_valid,
  output logic [6:0] a_idx,
  output logic       b_re,
  output logic [5:0] b_pair,
  // cycle t+1
  output logic       op_valid,
  output logic       first,
  output logic       last,
  output logic       stack_en,
  output logic       st_re,
  output logic [7:0] st_addr,
  // cycle t+3
  output logic       wr_en,
  output logic [7:0] wr_addr
);

  typedef struct packed {
    logic       valid;
    logic       first;
    logic       last;
    logic       use_stack;
    logic [7:0] c;
  } step_t;

  logic       run;
  logic [7:0] i;
  logic [5:0] k;
  step_t      s0, s1, s2, s3;

  always_comb begin
    s0.valid = run;
    s0.first = (i == 8'd0);
    s0.last  = (i == 8'(HALF));
    s0.c     = i + {1'b0, k, 1'b0};
    s0.use_stack = (k != 0) && (s0.c <= {1'b0, k, 1'b0} + 8'd126);
  end

  assign rd_valid = run;
  assign a_idx    = i[6:0];
  assign b_re     = run && (i == 8'd0);
  assign b_pair   = k;

  assign op_valid = s1.valid;
  assign first    = s1.first;
  assign last     = s1.last;
  assign stack_en = s1.use_stack;
  assign st_re    = s1.valid;
  assign st_addr  = s1.c;
  assign wr_en    = s3.valid;
  assign wr_addr  = s3.c;

  assign busy = run || s1.valid || s2.valid || s3.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      i    <= '0;
      k    <= '0;
      s1   <= '0;
      s2   <= '0;
      s3   <= '0;
      done <= 1'b0;
    end else begin
      s1   <= s0;
      s2   <= s1;
      s3   <= s2;
      done <= 1'b0;
      if (start && !busy) begin
        run <= 1'b1;
        i   <= '0;
        k   <= '0;
      end else if (run) begin
        if (i == 8'(HALF)) begin
          i <= '0;
          if (k == 6'(HALF/2 - 1)) run <= 1'b0;
          else k <= k + 1;
        end else i <= i + 1;
      end
      if (s3.valid && !s2.valid && !s1.valid && !run) done <= 1'b1;
    end
  end

endmodule
