// tb_nf3_mnpq: self-checking testbench of the Design 3 derivative modules
// nf3_m, nf3_n, nf3_p and nf3_q (multi-cycle, t = 4).
//
// Each operation pulses start with a fresh window held stable, then checks on
// every following rising edge that each module's done rises exactly after 1
// (m), 2 (n), 3 (p) and 4 (q) edges, stays low before that (n, p, q) and
// that the results equal the reference model. Every other operation holds
// start high for two cycles: the multi-state modules must ignore the second
// start while busy. The published truth-table windows are also compared with
// the published values.
`timescale 1ns / 1ps
module tb_nf3_mnpq;
  import nf_pkg::*;
  import nf_ref_pkg::*;

  localparam int NOPS = 600;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       start;
  nf_sample_t a, b, c, d, e;
  nf_fix_t    m, n, p, q;
  logic       m_done, n_done, p_done, q_done;
  int         checks = 0, failures = 0;

  nf3_m u_m (.clk, .rst_n, .start, .a, .b, .m, .done(m_done));
  nf3_n u_n (.clk, .rst_n, .start, .a, .b, .c, .n, .done(n_done));
  nf3_p u_p (.clk, .rst_n, .start, .a, .b, .c, .d, .p, .done(p_done));
  nf3_q u_q (.clk, .rst_n, .start, .a, .b, .c, .d, .e, .q, .done(q_done));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_op(input longint va, vb, vc, vd, ve, input bit long_start);
    logic [3:0] dn;
    a = nf_sample_t'(va); b = nf_sample_t'(vb); c = nf_sample_t'(vc);
    d = nf_sample_t'(vd); e = nf_sample_t'(ve);
    start = 1'b1;
    for (int k = 1; k <= 4; k++) begin
      @(posedge clk) #1;
      dn = {q_done, p_done, n_done, m_done};
      // module j (0 = m .. 3 = q) must be done exactly from edge j+1 on
      check(dn == 4'((1 << k) - 1), $sformatf("done flags %b after edge %0d", dn, k));
      if (k == 1 && m_done) check(longint'(m) == deriv_fix(1, 4, va, vb, vc, vd, ve), "m");
      if (k == 2 && n_done) check(longint'(n) == deriv_fix(2, 4, va, vb, vc, vd, ve), "n");
      if (k == 3 && p_done) check(longint'(p) == deriv_fix(3, 4, va, vb, vc, vd, ve), "p");
      if (k == 4 && q_done) check(longint'(q) == deriv_fix(4, 4, va, vb, vc, vd, ve), "q");
      if (!(k == 1 && long_start)) start = 1'b0;
    end
    check(longint'(m) == deriv_fix(1, 4, va, vb, vc, vd, ve) &&
          longint'(n) == deriv_fix(2, 4, va, vb, vc, vd, ve) &&
          longint'(p) == deriv_fix(3, 4, va, vb, vc, vd, ve), "m, n, p held until q is done");
    @(posedge clk) #1;
    check(m_done && n_done && p_done && q_done, "done flags held while idle");
  endtask

  initial begin
    longint va, vb, vc, vd, ve;
    real pm, pn, pp, pq, pw;
    rst_n = 1'b0;
    start = 1'b0;
    {a, b, c, d, e} = '0;
    repeat (2) @(posedge clk);
    #1;
    check({m_done, n_done, p_done, q_done} == 4'b0, "done cleared by reset");
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) begin
      table_row(i, va, vb, vc, vd, ve, pm, pn, pp, pq, pw);
      run_op(va, vb, vc, vd, ve, 1'b0);
      check(near(real'(m) / 256.0, pm, 1e-4) && near(real'(n) / 256.0, pn, 1e-4) &&
            near(real'(p) / 256.0, pp, 1e-4) && near(real'(q) / 256.0, pq, 1e-4),
            $sformatf("published row %0d", i));
    end
    for (int i = 0; i < NOPS; i++) begin
      va = rand_sample(); vb = rand_sample(); vc = rand_sample();
      vd = rand_sample(); ve = rand_sample();
      run_op(va, vb, vc, vd, ve, i[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * NOPS + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
