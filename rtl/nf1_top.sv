// nf1_top: NaturalFrequencyModule of Design 1: t is a run-time input and each
// m/n/p/q-module divides by the matching power of t with multipliers and a
// divider.
//
// The four derivative modules (m = x', n = x'', p = x''', q = x'''') run in
// parallel on the window a..e and register on the rising edge; the w-module
// (nf_w_sc) combines them and registers on the falling edge. A new window can be
// applied every cycle: y.m..y.q are valid after the rising edge that sampled
// the window and y.w / y.w_err half a cycle later, before the next rising edge.
//
// Ports: clk, rst_n (synchronous, active low), x (window a..e), t in, y (m, n, p,
// q, w, w_err) out.
module nf1_top
  import nf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  nf_window_t x,
  input  nf_t_t      t,
  output nf_result_t y
);
  nf_fix_t m, n, p, q;
  nf_w_t   w;
  logic    w_err;

  nf1_m u_m (.clk, .rst_n, .a(x.a), .b(x.b), .t(t), .m(m));
  nf1_n u_n (.clk, .rst_n, .a(x.a), .b(x.b), .c(x.c), .t(t), .n(n));
  nf1_p u_p (.clk, .rst_n, .a(x.a), .b(x.b), .c(x.c), .d(x.d), .t(t), .p(p));
  nf1_q u_q (.clk, .rst_n, .a(x.a), .b(x.b), .c(x.c), .d(x.d), .e(x.e), .t(t), .q(q));

  nf_w_sc u_w (.clk, .rst_n, .m, .n, .p, .q, .w, .w_err);

  always_comb y = '{m: m, n: n, p: p, q: q, w: w, w_err: w_err};
endmodule
