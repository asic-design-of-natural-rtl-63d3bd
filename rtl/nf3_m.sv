// nf3_m: the m-module of Design 3, the multi-cycle architecture in which every
// module may use one multiplier/divider and one adder/subtractor per state.
//
// m = (b - a) / t needs one subtraction and one division, so it takes a single
// state: on the rising edge that sees start high, m <= (b - a) / t is written
// and done rises. t = 2**LOG2_T (4), so the division is an exact shift of the
// Q.FRAC value. done stays high, and m is held, until the next start. The state
// count follows the architecture; the start/done handshake is this design's.
//
// Ports: clk, rst_n (synchronous, active low), start, a, b in; m (Q23.8), done
// out. Latency: 1 edge from start to done.
module nf3_m
  import nf_pkg::*;
#(
  parameter int unsigned LOG2_T = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  nf_sample_t a,
  input  nf_sample_t b,
  output nf_fix_t    m,
  output logic       done
);
  initial assert (LOG2_T <= FRAC) else $error("nf3_m: LOG2_T too large for FRAC");

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m    <= '0;
      done <= 1'b0;
    end else if (start) begin
      // S1: one subtract, one divide by t
      m    <= nf_int_to_fix(nf_fix_t'(b) - nf_fix_t'(a)) >>> LOG2_T;
      done <= 1'b1;
    end
  end
endmodule
