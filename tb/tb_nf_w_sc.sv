// tb_nf_w_sc: self-checking testbench of nf_w_sc, the single-cycle w-module.
//
// m, n, p, q are changed just after each rising edge. Just before the falling
// edge w must still show the previous result; just after it, the result for
// the new operands (falling-edge register, half-cycle latency). Operands come
// from the published truth-table rows (w compared with the published values),
// from random sample windows, and from two corner cases: a zero denominator
// (w = 0, w_err = 1) and a quotient beyond the Q15.16 range (saturation,
// w_err = 1).
`timescale 1ns / 1ps
module tb_nf_w_sc;
  import nf_pkg::*;
  import nf_ref_pkg::*;

  localparam int NRAND = 2000;

  logic    clk = 1'b0;
  logic    rst_n;
  nf_fix_t m, n, p, q;
  nf_w_t   w;
  logic    w_err;
  int      checks = 0, failures = 0;
  int      n_zero = 0, n_sat = 0;

  nf_w_sc dut (.clk, .rst_n, .m, .n, .p, .q, .w, .w_err);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // apply operands after a rising edge, check the falling-edge update
  task automatic step(input longint mf, nf, pf, qf, input bit has_pub, input real pw);
    longint ew, prev_w;
    bit     ee, prev_e;
    @(posedge clk) #1;
    prev_w = longint'(w);
    prev_e = w_err;
    m = nf_fix_t'(mf); n = nf_fix_t'(nf); p = nf_fix_t'(pf); q = nf_fix_t'(qf);
    w_expect(mf, nf, pf, qf, ew, ee);
    #3;
    check(longint'(w) == prev_w && w_err == prev_e, "w must not change before the falling edge");
    @(negedge clk) #1;
    check(w_match(longint'(w), w_err, ew, ee),
          $sformatf("w=%0d err=%0b expected %0d %0b (m=%0d n=%0d p=%0d q=%0d)",
                    w, w_err, ew, ee, mf, nf, pf, qf));
    if (has_pub) check(near(real'(w) / 65536.0, pw, 5e-5), $sformatf("published w %f", pw));
    if (ee && ew == 0) n_zero++;
    if (ee && ew != 0) n_sat++;
  endtask

  initial begin
    longint va, vb, vc, vd, ve;
    real pm, pn, pp, pq, pw;
    rst_n = 1'b0;
    {m, n, p, q} = '0;
    repeat (2) @(negedge clk);
    #1;
    check(w == 0 && !w_err, "reset");
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) begin
      table_row(i, va, vb, vc, vd, ve, pm, pn, pp, pq, pw);
      step(deriv_fix(1, 4, va, vb, vc, vd, ve), deriv_fix(2, 4, va, vb, vc, vd, ve),
           deriv_fix(3, 4, va, vb, vc, vd, ve), deriv_fix(4, 4, va, vb, vc, vd, ve), 1'b1, pw);
    end
    step(0, 0, 0, 0, 1'b0, 0.0);                  // all-zero window: zero denominator
    step(0, 1, 256000, 5, 1'b0, 0.0);             // tiny denominator: saturates
    step(0, 1, -256000, 5, 1'b0, 0.0);
    for (int i = 0; i < NRAND; i++) begin
      va = rand_sample(); vb = rand_sample(); vc = rand_sample();
      vd = rand_sample(); ve = rand_sample();
      if (i % 50 == 0) step(0, 0, 0, 0, 1'b0, 0.0);
      step(deriv_fix(1, 4, va, vb, vc, vd, ve), deriv_fix(2, 4, va, vb, vc, vd, ve),
           deriv_fix(3, 4, va, vb, vc, vd, ve), deriv_fix(4, 4, va, vb, vc, vd, ve), 1'b0, 0.0);
    end
    check(n_zero > 0 && n_sat > 0, $sformatf("corner cases seen: zero %0d saturated %0d", n_zero, n_sat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRAND + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
