// nf3_w: the w-module of Design 3 (multi-cycle, one multiplier/divider and one
// adder/subtractor per state).
//
// w = (n*q - p*p) / (m*p - n*n) in five states, with T1 and T2 the numerator
// and denominator registers:
//   S1: T1 <- n*q
//   S2: T1 <- T1 - p*p
//   S3: T2 <- m*p
//   S4: T2 <- T2 - n*n
//   S5: w  <- T1 / T2
// S1 is executed on the rising edge that sees start high (from idle); S5 raises
// done. m, n, p, q must stay stable for the five edges (the derivative modules
// hold them). A zero denominator gives w = 0 and w_err = 1; a quotient outside
// Q15.16 saturates and sets w_err. The five-state count follows the
// architecture; the split into states and the handshake are this design's.
//
// Ports: clk, rst_n (synchronous, active low), start, m, n, p, q (Q23.8) in;
// w (Q15.16), w_err, done out. Latency: 5 edges from start to done.
module nf3_w
  import nf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  nf_fix_t m,
  input  nf_fix_t n,
  input  nf_fix_t p,
  input  nf_fix_t q,
  output nf_w_t   w,
  output logic    w_err,
  output logic    done
);
  typedef enum logic [2:0] {ST_IDLE, ST_S2, ST_S3, ST_S4, ST_S5} state_t;
  state_t   state;
  nf_prod_t t1, t2;
  nf_wres_t res;

  always_comb res = nf_w_divide(t1, t2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      t1    <= '0;
      t2    <= '0;
      w     <= '0;
      w_err <= 1'b0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          t1    <= nf_prod_t'(n) * nf_prod_t'(q);
          done  <= 1'b0;
          state <= ST_S2;
        end
        ST_S2: begin
          t1    <= t1 - nf_prod_t'(p) * nf_prod_t'(p);
          state <= ST_S3;
        end
        ST_S3: begin
          t2    <= nf_prod_t'(m) * nf_prod_t'(p);
          state <= ST_S4;
        end
        ST_S4: begin
          t2    <= t2 - nf_prod_t'(n) * nf_prod_t'(n);
          state <= ST_S5;
        end
        ST_S5: begin
          w     <= res.w;
          w_err <= res.err;
          done  <= 1'b1;
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end
endmodule
