// nf3_n: the n-module of Design 3 (multi-cycle, one multiplier/divider and one
// adder/subtractor per state).
//
// n = (c - 2b + a) / t^2 in two states:
//   S1: R1 <- c - 2*b            (one multiply, one subtract)
//   S2: n  <- (R1 + a) / t^2     (one add, one divide; an exact shift, t = 4)
// S1 is executed on the rising edge that sees start high (from idle), S2 on the
// next edge, which also raises done. done and n hold until the next start; a
// start while busy is ignored. The two-state count follows the architecture;
// the exact split and the handshake are this design's.
//
// Ports: clk, rst_n (synchronous, active low), start, a..c in; n (Q23.8), done
// out. Latency: 2 edges from start to done.
module nf3_n
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
  output nf_fix_t    n,
  output logic       done
);
  initial assert (2 * LOG2_T <= FRAC) else $error("nf3_n: LOG2_T too large for FRAC");

  typedef enum logic {ST_IDLE, ST_S2} state_t;
  state_t  state;
  nf_fix_t r1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      r1    <= '0;
      n     <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          r1    <= nf_fix_t'(c) - 2 * nf_fix_t'(b);
          done  <= 1'b0;
          state <= ST_S2;
        end
        ST_S2: begin
          n     <= nf_int_to_fix(r1 + nf_fix_t'(a)) >>> (2 * LOG2_T);
          done  <= 1'b1;
          state <= ST_IDLE;
        end
      endcase
    end
  end
endmodule
