// nf_w_sc: the w-module of the single-cycle architectures (Designs 1 and 2).
//
// Computes w = (n*q - p*p) / (m*p - n*n), the squared natural frequency omega^2
// of the fitted second-order system, in one step: four multipliers, two
// subtractors and a divider, all combinational, registered on the FALLING clock
// edge. The m/n/p/q modules register on the rising edge, so w follows its
// inputs half a clock cycle later and a whole window is processed within one
// clock period. The falling-edge register and the equation follow the
// algorithm's description; the fixed-point formats and the zero-denominator
// rule (w = 0, w_err = 1; also set when the quotient saturates) are this
// design's choice.
//
// Ports: clk, rst_n (synchronous on the falling edge, active low), m, n, p, q
// in Q23.8, w out in Q15.16, w_err out.
module nf_w_sc
  import nf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  nf_fix_t m,
  input  nf_fix_t n,
  input  nf_fix_t p,
  input  nf_fix_t q,
  output nf_w_t   w,
  output logic    w_err
);
  nf_prod_t num, den;
  nf_wres_t res;

  always_comb begin
    num = nf_prod_t'(n) * nf_prod_t'(q) - nf_prod_t'(p) * nf_prod_t'(p);
    den = nf_prod_t'(m) * nf_prod_t'(p) - nf_prod_t'(n) * nf_prod_t'(n);
    res = nf_w_divide(num, den);
  end

  always_ff @(negedge clk) begin
    if (!rst_n) begin
      w     <= '0;
      w_err <= 1'b0;
    end else begin
      w     <= res.w;
      w_err <= res.err;
    end
  end
endmodule
