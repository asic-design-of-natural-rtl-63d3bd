// tb_nf2_mnpq: self-checking testbench of the Design 2 derivative modules
// nf2_m, nf2_n, nf2_p and nf2_q (t = 4 built in).
//
// A new window is applied every cycle, away from the rising edge; right after
// each rising edge the four outputs must equal the reference model's values
// for the window sampled on that edge (one-edge latency, one window per cycle).
// The published truth-table windows come first and are also compared with the
// published values; random windows over several ranges follow.
`timescale 1ns / 1ps
module tb_nf2_mnpq;
  import nf_pkg::*;
  import nf_ref_pkg::*;

  localparam int NRAND = 2000;

  logic       clk = 1'b0;
  logic       rst_n;
  nf_sample_t a, b, c, d, e;
  nf_fix_t    m, n, p, q;
  int         checks = 0, failures = 0;

  nf2_m u_m (.clk, .rst_n, .a, .b, .m);
  nf2_n u_n (.clk, .rst_n, .a, .b, .c, .n);
  nf2_p u_p (.clk, .rst_n, .a, .b, .c, .d, .p);
  nf2_q u_q (.clk, .rst_n, .a, .b, .c, .d, .e, .q);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic apply(input longint va, vb, vc, vd, ve);
    a = nf_sample_t'(va); b = nf_sample_t'(vb); c = nf_sample_t'(vc);
    d = nf_sample_t'(vd); e = nf_sample_t'(ve);
  endtask

  task automatic expect_outputs(input longint va, vb, vc, vd, ve);
    check(longint'(m) == deriv_fix(1, 4, va, vb, vc, vd, ve), $sformatf("m=%0d window %0d %0d", m, va, vb));
    check(longint'(n) == deriv_fix(2, 4, va, vb, vc, vd, ve), $sformatf("n=%0d", n));
    check(longint'(p) == deriv_fix(3, 4, va, vb, vc, vd, ve), $sformatf("p=%0d", p));
    check(longint'(q) == deriv_fix(4, 4, va, vb, vc, vd, ve), $sformatf("q=%0d", q));
  endtask

  initial begin
    longint va, vb, vc, vd, ve;
    real pm, pn, pp, pq, pw;
    rst_n = 1'b0;
    apply(1, 2, 3, 4, 5);
    repeat (2) @(posedge clk);
    #1;
    check(m == 0 && n == 0 && p == 0 && q == 0, "outputs cleared by reset");
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 3; i++) begin
      table_row(i, va, vb, vc, vd, ve, pm, pn, pp, pq, pw);
      apply(va, vb, vc, vd, ve);
      @(posedge clk) #1;
      expect_outputs(va, vb, vc, vd, ve);
      check(near(real'(m) / 256.0, pm, 1e-4) && near(real'(n) / 256.0, pn, 1e-4) &&
            near(real'(p) / 256.0, pp, 1e-4) && near(real'(q) / 256.0, pq, 1e-4),
            $sformatf("published row %0d", i));
      @(negedge clk);
    end
    for (int i = 0; i < NRAND; i++) begin
      va = rand_sample(); vb = rand_sample(); vc = rand_sample();
      vd = rand_sample(); ve = rand_sample();
      apply(va, vb, vc, vd, ve);
      @(posedge clk) #1;
      expect_outputs(va, vb, vc, vd, ve);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRAND + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
