// tb_nf3_w: self-checking testbench of nf3_w, the five-state w-module of
// Design 3.
//
// For each operation m, n, p, q are set and held, start is pulsed, and done
// must stay low for four rising edges and rise on the fifth, with w and w_err
// equal to the reference model. A start while busy (start held high for
// several cycles) must not disturb the operation. Operands come from the
// published truth-table rows (compared with the published w), random windows,
// a zero denominator and a saturating quotient.
`timescale 1ns / 1ps
module tb_nf3_w;
  import nf_pkg::*;
  import nf_ref_pkg::*;

  localparam int NOPS = 1000;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    start;
  nf_fix_t m, n, p, q;
  nf_w_t   w;
  logic    w_err, done;
  int      checks = 0, failures = 0;
  int      n_zero = 0, n_sat = 0;

  nf3_w dut (.clk, .rst_n, .start, .m, .n, .p, .q, .w, .w_err, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_op(input longint mf, nf, pf, qf, input bit has_pub, input real pw,
                        input int start_len);
    longint ew;
    bit     ee;
    m = nf_fix_t'(mf); n = nf_fix_t'(nf); p = nf_fix_t'(pf); q = nf_fix_t'(qf);
    w_expect(mf, nf, pf, qf, ew, ee);
    start = 1'b1;
    for (int k = 1; k <= 5; k++) begin
      @(posedge clk) #1;
      if (k >= start_len) start = 1'b0;
      check(done == (k == 5), $sformatf("done=%0b after edge %0d", done, k));
    end
    check(w_match(longint'(w), w_err, ew, ee),
          $sformatf("w=%0d err=%0b expected %0d %0b", w, w_err, ew, ee));
    if (has_pub) check(near(real'(w) / 65536.0, pw, 5e-5), $sformatf("published w %f", pw));
    if (ee && ew == 0) n_zero++;
    if (ee && ew != 0) n_sat++;
    @(posedge clk) #1;
    check(done && w_match(longint'(w), w_err, ew, ee), "result held while idle");
  endtask

  initial begin
    longint va, vb, vc, vd, ve;
    real pm, pn, pp, pq, pw;
    rst_n = 1'b0;
    start = 1'b0;
    {m, n, p, q} = '0;
    repeat (2) @(posedge clk);
    #1;
    check(!done && w == 0, "reset");
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) begin
      table_row(i, va, vb, vc, vd, ve, pm, pn, pp, pq, pw);
      run_op(deriv_fix(1, 4, va, vb, vc, vd, ve), deriv_fix(2, 4, va, vb, vc, vd, ve),
             deriv_fix(3, 4, va, vb, vc, vd, ve), deriv_fix(4, 4, va, vb, vc, vd, ve),
             1'b1, pw, 1);
    end
    run_op(0, 0, 0, 0, 1'b0, 0.0, 1);
    run_op(0, 1, 256000, 5, 1'b0, 0.0, 3);
    for (int i = 0; i < NOPS; i++) begin
      va = rand_sample(); vb = rand_sample(); vc = rand_sample();
      vd = rand_sample(); ve = rand_sample();
      run_op(deriv_fix(1, 4, va, vb, vc, vd, ve), deriv_fix(2, 4, va, vb, vc, vd, ve),
             deriv_fix(3, 4, va, vb, vc, vd, ve), deriv_fix(4, 4, va, vb, vc, vd, ve),
             1'b0, 0.0, 1 + (i % 4));
    end
    check(n_zero > 0 && n_sat > 0, $sformatf("corner cases seen: zero %0d saturated %0d", n_zero, n_sat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7 * NOPS + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
