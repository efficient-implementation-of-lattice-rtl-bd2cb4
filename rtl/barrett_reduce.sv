// barrett_reduce: x mod 7681 for a 20-bit x (the stacked sum of the SK lanes).
//
// Barrett reduction with k = 26 and m = floor(2^26 / 7681) = 8736:
//   qhat = (x * m) >> 26,   r = x - qhat * q,
// Since 2^26 - m*q = 7648, x*m/2^26 is below x/q by less than
// 2^20 * 7648 / (7681 * 2^26) < 0.02 for x < 2^20, so qhat underestimates
// floor(x / q) by at most 1: r < 2q and one conditional subtraction finishes
// the reduction (the exhaustive test over all 2^20 inputs confirms this). The source
// design names the Barrett block but does not give its constants; these are
// this design's choice. Purely combinational.
module barrett_reduce
  import sk_pkg::*;
(
  input  logic [SW-1:0] x,
  output coef_t         r
);

  localparam int unsigned K = 26;
  localparam int unsigned M = (1 << K) / Q;   // 8736

  logic [SW+14-1:0] prod;   // x * m, m < 2^14
  logic [SW-1:0]    qhat;
  logic [SW-1:0]    r0, r1;

  always_comb begin
    prod = (SW+14)'(x) * (SW+14)'(M);
    qhat = SW'(prod >> K);
    r0   = x - SW'(qhat * SW'(Q));
    r1   = (r0 >= SW'(Q)) ? r0 - SW'(Q) : r0;
    r    = coef_t'(r1);
  end

endmodule
