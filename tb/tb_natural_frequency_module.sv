// tb_natural_frequency_module: end-to-end testbench of the whole extractor,
// natural_frequency_module, at its default parameters.
//
// A stream of windows, one per clock cycle, is presented to all three
// architectures at once. Designs 1 and 2 must process every window: m..q right
// after the rising edge, w only after the falling edge. Design 1 runs with
// t = 4 most of the time and with other t (1..9, and 0) in between. Design 3
// takes a window when it is idle and start is high, ignores windows and starts
// while busy, and must raise done exactly 11 edges later with the result of
// the window it took. All results are compared with the reference model, and
// for t = 4 the three designs with each other. The published truth-table
// windows open the stream (compared with the published values), followed by an
// all-zero window (zero denominator), a window that overflows w with t = 1,
// and random windows. For the first half start is held high (Design 3 runs back
// to back), for the second half it is random.
//
// Each mechanism is counted and must occur: windows per design, windows with
// t /= 4, falling-edge updates, complete Design 3 operations, starts ignored
// while busy, zero denominators and saturated quotients.
`timescale 1ns / 1ps
module tb_natural_frequency_module;
  import nf_pkg::*;
  import nf_ref_pkg::*;

  localparam int NWIN    = 3000;
  localparam int LATENCY = 11;

  logic       clk = 1'b0;
  logic       rst_n;
  nf_window_t d1_x, d2_x, d3_x;
  nf_t_t      d1_t;
  nf_result_t d1_y, d2_y, d3_y;
  logic       d3_start, d3_done, d3_busy;
  int         checks = 0, failures = 0;

  // mechanism counters
  int n_d1 = 0, n_d1_other_t = 0, n_d2 = 0, n_negedge = 0, n_d3_ops = 0;
  int n_d3_ignored = 0, n_zero_den = 0, n_saturated = 0, n_agree = 0;

  natural_frequency_module dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic nf_window_t mkwin(input longint va, vb, vc, vd, ve);
    return '{a: nf_sample_t'(va), b: nf_sample_t'(vb), c: nf_sample_t'(vc),
             d: nf_sample_t'(vd), e: nf_sample_t'(ve)};
  endfunction

  function automatic void expect_all(input nf_window_t wi, input longint t,
                                     output longint mf, nf, pf, qf, ew, output bit ee);
    longint va, vb, vc, vd, ve;
    va = longint'(wi.a); vb = longint'(wi.b); vc = longint'(wi.c);
    vd = longint'(wi.d); ve = longint'(wi.e);
    mf = deriv_fix(1, t, va, vb, vc, vd, ve);
    nf = deriv_fix(2, t, va, vb, vc, vd, ve);
    pf = deriv_fix(3, t, va, vb, vc, vd, ve);
    qf = deriv_fix(4, t, va, vb, vc, vd, ve);
    w_expect(mf, nf, pf, qf, ew, ee);
  endfunction

  function automatic bit y_matches(input nf_result_t y, input longint mf, nf, pf, qf, ew,
                                   input bit ee);
    return longint'(y.m) == mf && longint'(y.n) == nf && longint'(y.p) == pf &&
           longint'(y.q) == qf && w_match(longint'(y.w), y.w_err, ew, ee);
  endfunction

  // Design 3 tracking (independent of the DUT's state)
  bit         d3_idle = 1'b1;
  int         d3_cnt = 0;
  nf_window_t d3_win;

  initial begin
    longint     va, vb, vc, vd, ve, tv;
    real        pm, pn, pp, pq, pw;
    nf_window_t wi;
    longint     mf, nf, pf, qf, ew, prev1, prev2;
    longint     m3, n3, p3, q3, ew3;
    bit         ee, ee3, pub, start_now;

    rst_n = 1'b0;
    d1_x = '0; d2_x = '0; d3_x = '0; d1_t = 4; d3_start = 1'b0;
    repeat (2) @(negedge clk);
    #1;
    check(d1_y == '0 && d2_y == '0 && !d3_done && !d3_busy, "reset");
    rst_n = 1'b1;

    for (int i = 0; i < NWIN; i++) begin
      // choose the window and t (we are just after a falling edge)
      pub = 1'b0;
      tv  = 4;
      if (i < 3) begin
        table_row(i, va, vb, vc, vd, ve, pm, pn, pp, pq, pw);
        pub = 1'b1;
      end else if (i == 3) begin
        {va, vb, vc, vd, ve} = '0;
      end else if (i == 4) begin
        va = 0; vb = 1; vc = 4; vd = 14; ve = 30000; tv = 1;
      end else begin
        va = rand_sample(); vb = rand_sample(); vc = rand_sample();
        vd = rand_sample(); ve = rand_sample();
        if (i % 5 == 0) tv = longint'($urandom_range(9));
      end
      wi = mkwin(va, vb, vc, vd, ve);
      d1_x = wi; d2_x = wi; d3_x = wi;
      d1_t = nf_t_t'(tv);
      start_now = (i < NWIN / 2) ? 1'b1 : ($urandom_range(9) < 3);
      d3_start = start_now;
      prev1 = longint'(d1_y.w);
      prev2 = longint'(d2_y.w);

      @(posedge clk) #1;
      // Designs 1 and 2: derivatives after the rising edge, w unchanged yet
      expect_all(wi, tv, mf, nf, pf, qf, ew, ee);
      check(longint'(d1_y.m) == mf && longint'(d1_y.n) == nf && longint'(d1_y.p) == pf &&
            longint'(d1_y.q) == qf, $sformatf("design 1 m..q window %0d t=%0d", i, tv));
      check(longint'(d1_y.w) == prev1 && longint'(d2_y.w) == prev2,
            "w of designs 1 and 2 holds until the falling edge");
      // Design 3
      if (d3_idle) begin
        if (start_now) begin
          d3_idle = 1'b0;
          d3_cnt  = 1;
          d3_win  = wi;
          check(d3_busy && !d3_done, "design 3 busy after taking a window");
        end
      end else begin
        d3_cnt++;
        if (start_now) n_d3_ignored++;
        if (d3_cnt == LATENCY) begin
          expect_all(d3_win, 4, m3, n3, p3, q3, ew3, ee3);
          check(d3_done && !d3_busy, $sformatf("design 3 done after %0d edges", LATENCY));
          check(y_matches(d3_y, m3, n3, p3, q3, ew3, ee3), "design 3 result");
          n_d3_ops++;
          d3_idle = 1'b1;
        end else begin
          check(d3_busy && !d3_done, $sformatf("design 3 busy at edge %0d", d3_cnt));
        end
      end

      @(negedge clk) #1;
      check(y_matches(d1_y, mf, nf, pf, qf, ew, ee), $sformatf("design 1 window %0d", i));
      n_d1++;
      if (tv != 4) n_d1_other_t++;
      expect_all(wi, 4, mf, nf, pf, qf, ew, ee);
      check(y_matches(d2_y, mf, nf, pf, qf, ew, ee), $sformatf("design 2 window %0d", i));
      n_d2++;
      n_negedge++;
      if (tv == 4) begin
        check(d1_y == d2_y, "designs 1 and 2 agree for t = 4");
        n_agree++;
      end
      if (ee && ew == 0) n_zero_den++;
      if (d1_y.w_err && d1_y.w != 0) n_saturated++;
      if (pub)
        check(near(real'(d2_y.m) / 256.0, pm, 1e-4) && near(real'(d2_y.n) / 256.0, pn, 1e-4) &&
              near(real'(d2_y.p) / 256.0, pp, 1e-4) && near(real'(d2_y.q) / 256.0, pq, 1e-4) &&
              near(real'(d2_y.w) / 65536.0, pw, 5e-5), $sformatf("published row %0d", i));
    end

    $display("mechanisms: d1 windows %0d (t/=4: %0d), d2 windows %0d, falling-edge updates %0d,",
             n_d1, n_d1_other_t, n_d2, n_negedge);
    $display("            d3 operations %0d, d3 starts ignored while busy %0d,", n_d3_ops, n_d3_ignored);
    $display("            zero denominators %0d, saturated quotients %0d, d1/d2 agreements %0d",
             n_zero_den, n_saturated, n_agree);
    check(n_d1 > 0, "mechanism: design 1 windows");
    check(n_d1_other_t > 0, "mechanism: design 1 with t /= 4");
    check(n_d2 > 0, "mechanism: design 2 windows");
    check(n_negedge > 0, "mechanism: falling-edge w update");
    check(n_d3_ops > 0, "mechanism: design 3 complete operations");
    check(n_d3_ignored > 0, "mechanism: design 3 start ignored while busy");
    check(n_zero_den > 0, "mechanism: zero denominator");
    check(n_saturated > 0, "mechanism: saturated quotient");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NWIN + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
