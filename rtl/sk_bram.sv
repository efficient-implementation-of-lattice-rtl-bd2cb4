// sk_bram: block-RAM model used for every memory of the SK multiplier
// (input polynomials, a_mid, b_mid, the b_low copy, ab_low, ab_high, ab_mid
// and the result). One write port and two independent read ports with
// registered outputs (one-cycle read latency); a read port with re low keeps
// its last output. A read of the address being written returns the old data.
module sk_bram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 13,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re0,
  input  logic [AW-1:0]    raddr0,
  output logic [WIDTH-1:0] rdata0,
  input  logic             re1,
  input  logic [AW-1:0]    raddr1,
  output logic [WIDTH-1:0] rdata1
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re0) rdata0 <= mem[raddr0];
    if (re1) rdata1 <= mem[raddr1];
  end

endmodule
