// nf_ref_pkg: reference model used by the testbenches of the natural-frequency
// extractor. It recomputes every quantity from the equations with 64-bit
// integers and double-precision reals, independently of the RTL:
//   m = (b-a)/t, n = (c-2b+a)/t^2, p = (d-3c+3b-a)/t^3, q = (e-4d+6c-4b+a)/t^4
//   w = (n*q - p*p)/(m*p - n*n)
// m..q are expected in Q.8 (value * 256, truncated toward zero), w in Q.16
// (truncated toward zero, saturating at the 32-bit range, error flag on a zero
// denominator or saturation).
package nf_ref_pkg;

  // numerators of the four derivatives, integers
  function automatic longint num_of(input int k, input longint a, b, c, d, e);
    case (k)
      1: return b - a;
      2: return c - 2 * b + a;
      3: return d - 3 * c + 3 * b - a;
      default: return e - 4 * d + 6 * c - 4 * b + a;
    endcase
  endfunction

  // derivative k (1 = m .. 4 = q) in Q.8 for time step t; 0 when t = 0
  function automatic longint deriv_fix(input int k, input longint t,
                                       input longint a, b, c, d, e);
    longint den;
    den = 1;
    for (int i = 0; i < k; i++) den = den * t;
    if (den == 0) return 0;
    return (num_of(k, a, b, c, d, e) * 256) / den;
  endfunction

  // expected w in Q.16 and its error flag, from m..q in Q.8
  function automatic void w_expect(input longint mf, nf, pf, qf,
                                   output longint w_q16, output bit err);
    real num, den, wr;
    num = real'(nf) * real'(qf) - real'(pf) * real'(pf);
    den = real'(mf) * real'(pf) - real'(nf) * real'(nf);
    if (den == 0.0) begin
      w_q16 = 0;
      err   = 1'b1;
      return;
    end
    wr = num / den * 65536.0;
    if (wr >= 2147483647.0) begin
      w_q16 = 2147483647;
      err   = 1'b1;
    end else if (wr <= -2147483648.0) begin
      w_q16 = -64'sd2147483648;
      err   = 1'b1;
    end else begin
      w_q16 = longint'($rtoi(wr));   // $rtoi truncates toward zero
      err   = 1'b0;
    end
  endfunction

  // |dut - expected| <= 1 LSB (the real model may round the other way)
  function automatic bit w_match(input longint dut, input bit dut_err,
                                 input longint exp_w, input bit exp_err);
    longint diff;
    diff = dut - exp_w;
    if (diff < 0) diff = -diff;
    return (dut_err == exp_err) && (diff <= 1);
  endfunction

  // The three windows of the published truth table, with the m, n, p, q and w
  // values read from the published waveforms (rounded to about 6 digits).
  function automatic void table_row(input int i, output longint a, b, c, d, e,
                                    output real pm, pn, pp, pq, pw);
    case (i)
      0: begin
        a = 23; b = 42; c = 70; d = 11; e = 23;
        pm = 4.75; pn = 0.5625; pp = -1.5; pq = 0.992188; pw = 0.227362;
      end
      1: begin
        a = 54; b = 20; c = 35; d = 30; e = 13;
        pm = -8.5; pn = 3.0625; pp = -1.07813; pq = 0.300781; pw = 1.12273;
      end
      default: begin
        a = 10; b = 34; c = 42; d = 50; e = 19;
        pm = 6.0; pn = -1.0; pp = 0.25; pq = -0.214844; pw = 0.304688;
      end
    endcase
  endfunction

  function automatic bit near(input real x, input real y, input real tol);
    return (x - y <= tol) && (y - x <= tol);
  endfunction

  // a sample drawn from a few ranges so that small, large and extreme values all occur
  function automatic longint rand_sample();
    case ($urandom_range(3))
      0: return longint'($urandom_range(200)) - 100;
      1: return longint'($urandom_range(4000)) - 2000;
      2: return longint'($urandom_range(65535)) - 32768;
      default: return longint'($urandom_range(20));
    endcase
  endfunction

endpackage
