// nf2_m: the m-module of Design 2, the single-cycle architecture with the time
// step fixed at t = 2**LOG2_T (4 by default).
//
// Computes m = (b - a) / t and registers it on the rising clock edge, so a new window of
// samples is accepted every cycle and the result appears one edge later. Because
// t is a constant power of two, the division by t^k is a change of binary
// point: the integer numerator is shifted into Q.FRAC, with no divider or
// multiplier by t (the equation and the t = 4 substitution are the algorithm's;
// the fixed-point format is this design's choice). The small constant factors
// are written as multiplications and reduce to shifts and adds.
//
// Ports: clk, rst_n (synchronous, active low, clears the output), samples in,
// m out as nf_fix_t (Q23.8).
module nf2_m
  import nf_pkg::*;
#(
  parameter int unsigned LOG2_T = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  nf_sample_t a,
  input  nf_sample_t b,
  output nf_fix_t    m
);
  initial assert (LOG2_T <= FRAC) else $error("nf2_m: LOG2_T too large for FRAC");

  nf_fix_t num;
  always_comb num = nf_fix_t'(b) - nf_fix_t'(a);

  always_ff @(posedge clk) begin
    if (!rst_n) m <= '0;
    else        m <= num <<< (FRAC - LOG2_T);
  end
endmodule
