// nf2_top: NaturalFrequencyModule of Design 2: t is fixed at 2**LOG2_T = 4, so the
// divisions by t, t^2, t^3, t^4 become binary-point shifts (the architecture
// the algorithm's authors preferred: same speed as Design 1, far less logic).
//
// The four derivative modules (m = x', n = x'', p = x''', q = x'''') run in
// parallel on the window a..e and register on the rising edge; the w-module
// (nf_w_sc) combines them and registers on the falling edge. A new window can be
// applied every cycle: y.m..y.q are valid after the rising edge that sampled
// the window and y.w / y.w_err half a cycle later, before the next rising edge.
//
// Ports: clk, rst_n (synchronous, active low), x (window a..e) in, y (m, n, p,
// q, w, w_err) out.
module nf2_top
  import nf_pkg::*;
#(
  parameter int unsigned LOG2_T = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  nf_window_t x,
  output nf_result_t y
);
  nf_fix_t m, n, p, q;
  nf_w_t   w;
  logic    w_err;

  nf2_m #(.LOG2_T(LOG2_T)) u_m (.clk, .rst_n, .a(x.a), .b(x.b), .m(m));
  nf2_n #(.LOG2_T(LOG2_T)) u_n (.clk, .rst_n, .a(x.a), .b(x.b), .c(x.c), .n(n));
  nf2_p #(.LOG2_T(LOG2_T)) u_p (.clk, .rst_n, .a(x.a), .b(x.b), .c(x.c), .d(x.d), .p(p));
  nf2_q #(.LOG2_T(LOG2_T)) u_q (.clk, .rst_n, .a(x.a), .b(x.b), .c(x.c), .d(x.d), .e(x.e), .q(q));

  nf_w_sc u_w (.clk, .rst_n, .m, .n, .p, .q, .w, .w_err);

  always_comb y = '{m: m, n: n, p: p, q: q, w: w, w_err: w_err};
endmodule
