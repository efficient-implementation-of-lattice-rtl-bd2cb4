// sk_lane: one DSP lane of the sk sub-module.
//
// The multiplicand pair (bE, bO) = (b[2k], b[2k+1]) is packed into one 25-bit
// DSP operand {bE, 13'b0, bO}; a single 13x25 multiplication then yields both
// products a*bE (bits 37:19) and a*bO (bits 18:0). With a < 7681 and b < 64 a
// product fits 19 bits, so the fields never overlap.
// Walking the a coefficients i = 0, 1, ... with a fixed pair, a[i]*bO and
// a[i+1]*bE land on the same result coefficient i+2k+1. The lane keeps the
// odd product of the previous step in a register and adds it to the even
// product of the current step, so each step produces one finished
// contribution for one result coefficient c = i + 2k:
//     sum = a[i]*bE + a[i-1]*bO  (+ inStack, the partial sum read back)
// first drops the odd term (i = 0), last drops the even term (the extra
// step i = 128 that flushes the final odd product), stack_en selects the
// partial sum or 0 (coefficient not touched yet). The 20-bit sum is reduced
// modulo q by barrett_reduce.
//
// Timing: operands and flags at cycle t (in_valid); inStack must arrive at
// t+1; the reduced result is registered and valid at t+2 (out_valid).
module sk_lane
  import sk_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  coef_t  a,
  input  bcoef_t b_e,
  input  bcoef_t b_o,
  input  logic   first,
  input  logic   last,
  input  logic   stack_en,
  input  coef_t  in_stack,      // one cycle after the operands
  output logic   out_valid,
  output coef_t  ab
);

  logic [2*PW-1:0] dsp_q;                // registered DSP product (38 bits)
  logic [PW-1:0]   odd_q;                // odd product of the previous step
  logic            v_q, first_q, last_q, stack_q;
  logic [24:0]     packed_b;
  logic [PW-1:0]   pe, po;
  logic [SW-1:0]   merged, total;
  coef_t           red;

  assign packed_b = {b_e, 13'b0, b_o};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsp_q   <= '0;
      v_q     <= 1'b0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
      stack_q <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        dsp_q   <= (2*PW)'(a) * (2*PW)'(packed_b);
        first_q <= first;
        last_q  <= last;
        stack_q <= stack_en;
      end
    end
  end

  assign pe = dsp_q[2*PW-1:PW];
  assign po = dsp_q[PW-1:0];

  always_comb begin
    merged = (last_q ? '0 : SW'(pe)) + (first_q ? '0 : SW'(odd_q));
    total  = merged + (stack_q ? SW'(in_stack) : '0);
  end

  barrett_reduce u_red (.x(total), .r(red));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_q     <= '0;
      out_valid <= 1'b0;
      ab        <= '0;
    end else begin
      out_valid <= v_q;
      if (v_q) begin
        odd_q <= po;
        ab    <= red;
      end
    end
  end

endmodule
