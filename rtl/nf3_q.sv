// nf3_q: the q-module of Design 3 (multi-cycle, one multiplier/divider and one
// adder/subtractor per state).
//
// q = (e - 4d + 6c - 4b + a) / t^4 in four states, with R1 the accumulator:
//   S1: R1 <- e - 4*d
//   S2: R1 <- 6*c + R1
//   S3: R1 <- R1 - 4*b
//   S4: q  <- (R1 + a) / t^4     (t^4 = 256; an exact shift of the Q.FRAC value)
// This is the longest of the four derivative modules and sets the 4-cycle
// phase of Design 3. S1 is executed on the rising edge that sees start high
// (from idle); S4 raises done. done and q hold until the next start; a start
// while busy is ignored. The schedule follows the architecture's q-module
// listing; the handshake is this design's.
//
// Ports: clk, rst_n (synchronous, active low), start, a..e in; q (Q23.8), done
// out. Latency: 4 edges from start to done.
module nf3_q
  import nf_pkg::*;
#(
  parameter int unsigned LOG2_T = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  nf_sample_t a,
  input  nf_sample_t b,
  input  nf_sample_t c,
  input  nf_sample_t d,
  input  nf_sample_t e,
  output nf_fix_t    q,
  output logic       done
);
  initial assert (4 * LOG2_T <= FRAC) else $error("nf3_q: LOG2_T too large for FRAC");

  typedef enum logic [1:0] {ST_IDLE, ST_S2, ST_S3, ST_S4} state_t;
  state_t  state;
  nf_fix_t r1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      r1    <= '0;
      q     <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          r1    <= nf_fix_t'(e) - 4 * nf_fix_t'(d);
          done  <= 1'b0;
          state <= ST_S2;
        end
        ST_S2: begin
          r1    <= 6 * nf_fix_t'(c) + r1;
          state <= ST_S3;
        end
        ST_S3: begin
          r1    <= r1 - 4 * nf_fix_t'(b);
          state <= ST_S4;
        end
        ST_S4: begin
          q     <= nf_int_to_fix(r1 + nf_fix_t'(a)) >>> (4 * LOG2_T);
          done  <= 1'b1;
          state <= ST_IDLE;
        end
      endcase
    end
  end
endmodule
