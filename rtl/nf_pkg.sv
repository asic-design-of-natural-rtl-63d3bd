// nf_pkg: widths, fixed-point formats and shared types of the natural-frequency
// (omega^2) feature extractor for atrial-fibrillation detection.
//
// The extractor takes a window of five ECG samples a..e (x_n .. x_{n-4}), forms
// the finite-difference derivatives m = x', n = x'', p = x''', q = x'''' with a
// time step t, and outputs w = (n*q - p*p) / (m*p - n*n), the squared natural
// frequency of a second-order system fitted to the window.
//
// Number formats (this design's choice; the algorithm itself is written in real
// numbers):
//   samples      nf_sample_t  signed integer, XW bits
//   m, n, p, q   nf_fix_t     signed Q(DW-FRAC-1).FRAC; FRAC = 8 holds the
//                             divisors 4, 16, 64, 256 of t = 4 exactly
//   products     nf_prod_t    signed, 2*FRAC fraction bits
//   w            nf_w_t       signed Q(WW-WFRAC-1).WFRAC, saturating
// Division truncates toward zero. A zero denominator gives w = 0 and w_err = 1.
package nf_pkg;

  localparam int XW    = 16;          // sample width
  localparam int FRAC  = 8;           // fraction bits of m, n, p, q
  localparam int DW    = 32;          // width of m, n, p, q
  localparam int PW    = 2 * DW;      // width of products n*q, p*p, m*p, n*n
  localparam int WFRAC = 16;          // fraction bits of w
  localparam int WW    = 32;          // width of w
  localparam int TW    = 8;           // width of the run-time t of Design 1
  localparam int QW    = PW + WFRAC;  // width of the shifted dividend of w

  typedef logic signed [XW-1:0] nf_sample_t;
  typedef logic signed [DW-1:0] nf_fix_t;
  typedef logic signed [PW-1:0] nf_prod_t;
  typedef logic signed [WW-1:0] nf_w_t;
  typedef logic signed [QW-1:0] nf_quot_t;
  typedef logic        [TW-1:0] nf_t_t;

  // One window of samples: a = x_n (newest) .. e = x_{n-4} (oldest).
  typedef struct packed {
    nf_sample_t a;
    nf_sample_t b;
    nf_sample_t c;
    nf_sample_t d;
    nf_sample_t e;
  } nf_window_t;

  // Everything a NaturalFrequencyModule reports.
  typedef struct packed {
    nf_fix_t m;
    nf_fix_t n;
    nf_fix_t p;
    nf_fix_t q;
    nf_w_t   w;
    logic    w_err;
  } nf_result_t;

  typedef struct packed {
    nf_w_t w;
    logic  err;
  } nf_wres_t;

  localparam nf_quot_t W_MAX = (nf_quot_t'(1) <<< (WW - 1)) - nf_quot_t'(1);
  localparam nf_quot_t W_MIN = -(nf_quot_t'(1) <<< (WW - 1));

  // Sign-extend an integer-valued quantity into the Q.FRAC format.
  function automatic nf_fix_t nf_int_to_fix(input nf_fix_t v);
    return v <<< FRAC;
  endfunction

  // w = num / den with num and den carrying 2*FRAC fraction bits; the result
  // has WFRAC fraction bits, saturates to the nf_w_t range and flags a zero
  // denominator or a saturated quotient in err.
  function automatic nf_wres_t nf_w_divide(input nf_prod_t num, input nf_prod_t den);
    nf_wres_t r;
    nf_quot_t quo;
    quo = '0;
    if (den == '0) begin
      r.w   = '0;
      r.err = 1'b1;
    end else begin
      quo = (nf_quot_t'(num) <<< WFRAC) / nf_quot_t'(den);
      if (quo > W_MAX) begin
        r.w   = nf_w_t'(W_MAX);
        r.err = 1'b1;
      end else if (quo < W_MIN) begin
        r.w   = nf_w_t'(W_MIN);
        r.err = 1'b1;
      end else begin
        r.w   = nf_w_t'(quo);
        r.err = 1'b0;
      end
    end
    return r;
  endfunction

endpackage
