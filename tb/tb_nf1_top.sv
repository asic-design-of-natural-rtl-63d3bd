// tb_nf1_top: end-to-end testbench of nf1_top, the Design 1 NaturalFrequencyModule.
//
// One window per clock cycle, applied just after the falling edge. After the
// next rising edge y.m..y.q must match the reference model; just before the
// falling edge y.w must still hold the previous window's result, and just
// after it the new one: the whole window is processed within one clock
// period. The published truth-table windows run first (and are compared with
// the published m, n, p, q and w), then an all-zero window (zero denominator)
// and random windows, half of them with t = 4 and half with t from 0..9.
`timescale 1ns / 1ps
module tb_nf1_top;
  import nf_pkg::*;
  import nf_ref_pkg::*;

  localparam int NRAND = 2000;

  logic       clk = 1'b0;
  logic       rst_n;
  nf_window_t x;
  nf_result_t y;
  nf_t_t      t;
  longint     tv;
  int         checks = 0, failures = 0;
  int         n_err = 0;

  nf1_top dut (.clk, .rst_n, .x, .t, .y);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic window(input longint va, vb, vc, vd, ve, input bit has_pub,
                        input real pm, pn, pp, pq, pw);
    longint mf, nf, pf, qf, ew, prev_w;
    bit     ee;
    x = '{a: nf_sample_t'(va), b: nf_sample_t'(vb), c: nf_sample_t'(vc),
          d: nf_sample_t'(vd), e: nf_sample_t'(ve)};
    t = nf_t_t'(tv);
    mf = deriv_fix(1, tv, va, vb, vc, vd, ve);
    nf = deriv_fix(2, tv, va, vb, vc, vd, ve);
    pf = deriv_fix(3, tv, va, vb, vc, vd, ve);
    qf = deriv_fix(4, tv, va, vb, vc, vd, ve);
    w_expect(mf, nf, pf, qf, ew, ee);
    prev_w = longint'(y.w);
    @(posedge clk) #1;
    check(longint'(y.m) == mf && longint'(y.n) == nf && longint'(y.p) == pf &&
          longint'(y.q) == qf, $sformatf("m..q for window %0d %0d %0d %0d %0d", va, vb, vc, vd, ve));
    check(longint'(y.w) == prev_w, "w holds until the falling edge");
    @(negedge clk) #1;
    check(w_match(longint'(y.w), y.w_err, ew, ee),
          $sformatf("w=%0d err=%0b expected %0d %0b", y.w, y.w_err, ew, ee));
    if (ee) n_err++;
    if (has_pub)
      check(near(real'(y.m) / 256.0, pm, 1e-4) && near(real'(y.n) / 256.0, pn, 1e-4) &&
            near(real'(y.p) / 256.0, pp, 1e-4) && near(real'(y.q) / 256.0, pq, 1e-4) &&
            near(real'(y.w) / 65536.0, pw, 5e-5), "published values");
  endtask

  initial begin
    longint va, vb, vc, vd, ve;
    real pm, pn, pp, pq, pw;
    rst_n = 1'b0;
    x = '0;
    tv = 4;
    t = 4;
    repeat (2) @(negedge clk);
    #1;
    check(y == '0, "reset");
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) begin
      table_row(i, va, vb, vc, vd, ve, pm, pn, pp, pq, pw);
      window(va, vb, vc, vd, ve, 1'b1, pm, pn, pp, pq, pw);
    end
    window(0, 0, 0, 0, 0, 1'b0, 0, 0, 0, 0, 0);
    for (int i = 0; i < NRAND; i++) begin
      va = rand_sample(); vb = rand_sample(); vc = rand_sample();
      vd = rand_sample(); ve = rand_sample();
      tv = (i % 2 == 0) ? 4 : longint'($urandom_range(9));
      window(va, vb, vc, vd, ve, 1'b0, 0, 0, 0, 0, 0);
    end
    check(n_err > 0, "error flag exercised");
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
