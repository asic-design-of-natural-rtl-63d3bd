// nf1_n: the n-module of Design 1, the single-cycle architecture with the
// time step t as a run-time input.
//
// Computes n = (c - 2b + a) / (t*t) and registers it on the rising clock edge: a new window is
// accepted every cycle and the result appears one edge later. The power of t
// is formed with multipliers and the quotient with a divider, as the equation
// is written (this is what makes Design 1 large). The numerator is moved into
// Q.FRAC before dividing, so for t = 4 the result is exact; other t truncate
// toward zero. t = 0 gives 0 (this design's choice; the algorithm assumes t > 0).
//
// Ports: clk, rst_n (synchronous, active low, clears the output), samples and
// t (unsigned, TW bits) in, n out as nf_fix_t (Q23.8).
module nf1_n
  import nf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  nf_sample_t a,
  input  nf_sample_t b,
  input  nf_sample_t c,
  input  nf_t_t      t,
  output nf_fix_t    n
);
  nf_prod_t num, den;

  always_comb begin
    num = nf_prod_t'(nf_int_to_fix(nf_fix_t'(c) - 2 * nf_fix_t'(b) + nf_fix_t'(a)));
    den = nf_prod_t'(t) * nf_prod_t'(t);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)          n <= '0;
    else if (den == '0)  n <= '0;
    else                 n <= nf_fix_t'(num / den);
  end
endmodule
