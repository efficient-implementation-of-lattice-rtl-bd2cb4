// sk_pkg: constants and modular helpers of the SPMA-Karatsuba (SK) R-LWE
// polynomial multiplier, c = a * b in Z_q[x]/(x^256 + 1), q = 7681.
package sk_pkg;

  localparam int unsigned N     = 256;    // polynomial degree
  localparam int unsigned HALF  = N / 2;  // size of a Karatsuba half
  localparam int unsigned Q     = 7681;   // prime modulus
  localparam int unsigned W     = 13;     // coefficient width of a and of results
  localparam int unsigned BW    = 6;      // multiplicand field width at the DSP
  localparam int unsigned PW    = 19;     // width of one packed product (13 + 6)
  localparam int unsigned SW    = 20;     // width of the sum fed to Barrett

  typedef logic [W-1:0]  coef_t;
  typedef logic [BW-1:0] bcoef_t;

  // (x + y) mod q for x, y < q
  function automatic coef_t mod_add(coef_t x, coef_t y);
    logic [W:0] s;
    s = {1'b0, x} + {1'b0, y};
    return (s >= (W+1)'(Q)) ? coef_t'(s - (W+1)'(Q)) : coef_t'(s);
  endfunction

  // (x - y) mod q for x, y < q
  function automatic coef_t mod_sub(coef_t x, coef_t y);
    return (x >= y) ? coef_t'(x - y) : coef_t'(x + coef_t'(Q) - y);
  endfunction

endpackage
