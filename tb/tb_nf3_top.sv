// tb_nf3_top: end-to-end testbench of nf3_top, the Design 3 NaturalFrequencyModule.
//
// Each operation presents a window with a start pulse and counts rising edges
// until done: it must be exactly 11 (1 to store the window, 4 for the
// concurrent m/n/p/q modules, 5 for the w-module, 1 to raise done), with busy
// high and done low in between. The results must match the reference model.
// Some operations change the window and raise start again while busy: both
// must be ignored. Operations are started back to back (start in the cycle
// done is seen) and with idle gaps. The published truth-table windows run
// first and are compared with the published values; then an all-zero window
// (zero denominator) and random windows.
`timescale 1ns / 1ps
module tb_nf3_top;
  import nf_pkg::*;
  import nf_ref_pkg::*;

  localparam int NOPS    = 500;
  localparam int LATENCY = 11;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       start;
  nf_window_t x;
  nf_result_t y;
  logic       done, busy;
  int         checks = 0, failures = 0;
  int         n_busy_start = 0, n_err = 0;

  nf3_top dut (.clk, .rst_n, .start, .x, .y, .done, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_op(input longint va, vb, vc, vd, ve, input bit poke, input bit has_pub,
                        input real pm, pn, pp, pq, pw);
    longint mf, nf, pf, qf, ew;
    bit     ee;
    int     edges;
    x = '{a: nf_sample_t'(va), b: nf_sample_t'(vb), c: nf_sample_t'(vc),
          d: nf_sample_t'(vd), e: nf_sample_t'(ve)};
    mf = deriv_fix(1, 4, va, vb, vc, vd, ve);
    nf = deriv_fix(2, 4, va, vb, vc, vd, ve);
    pf = deriv_fix(3, 4, va, vb, vc, vd, ve);
    qf = deriv_fix(4, 4, va, vb, vc, vd, ve);
    w_expect(mf, nf, pf, qf, ew, ee);
    start = 1'b1;
    edges = 0;
    do begin
      @(posedge clk) #1;
      edges++;
      start = 1'b0;
      if (!done) check(busy, "busy while the operation runs");
      if (poke && edges == 3) begin
        // a new window and start while busy: must be ignored
        x = ~x;
        start = 1'b1;
        n_busy_start++;
      end
    end while (!done && edges < 20);
    check(edges == LATENCY, $sformatf("done after %0d edges, expected %0d", edges, LATENCY));
    check(!busy, "not busy when done");
    check(longint'(y.m) == mf && longint'(y.n) == nf && longint'(y.p) == pf &&
          longint'(y.q) == qf, $sformatf("m..q for window %0d %0d %0d %0d %0d", va, vb, vc, vd, ve));
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
    start = 1'b0;
    x = '0;
    repeat (2) @(posedge clk);
    #1;
    check(!done && !busy, "reset");
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) begin
      table_row(i, va, vb, vc, vd, ve, pm, pn, pp, pq, pw);
      run_op(va, vb, vc, vd, ve, 1'b0, 1'b1, pm, pn, pp, pq, pw);
    end
    run_op(0, 0, 0, 0, 0, 1'b0, 1'b0, 0, 0, 0, 0, 0);
    for (int i = 0; i < NOPS; i++) begin
      va = rand_sample(); vb = rand_sample(); vc = rand_sample();
      vd = rand_sample(); ve = rand_sample();
      run_op(va, vb, vc, vd, ve, (i % 3 == 0), 1'b0, 0, 0, 0, 0, 0);
      if (i % 4 == 1) begin
        repeat (2) @(posedge clk);
        #1;
        check(done && !busy, "done held while idle");
      end
    end
    check(n_busy_start > 0 && n_err > 0, "busy start and error flag exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16 * NOPS + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
