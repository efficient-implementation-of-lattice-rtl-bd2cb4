// ks_result_mem: result memory of the KaratSaber multiplier.
//
// 16 words of 16 coefficients (13 bits each, 208 bits per word): word t holds
// coefficients 16t..16t+15 of the product. One write port, one read port with
// a registered (one-cycle) read, as a block RAM would have. The source design
// shows this memory outside the multiplier without describing it; its shape
// here matches the 208-bit data width of the multiplier's a interface.
module ks_result_mem
  import ks_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic [3:0] waddr,
  input  subpoly_t   wdata,
  input  logic       re,
  input  logic [3:0] raddr,
  output subpoly_t   rdata
);

  subpoly_t mem [NACC];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
