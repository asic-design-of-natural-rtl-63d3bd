// nf3_p: the p-module of Design 3 (multi-cycle, one multiplier/divider and one
// adder/subtractor per state).
//
// p = (d - 3c + 3b - a) / t^3 in three states:
//   S1: R1 <- d - 3*c
//   S2: R1 <- R1 + 3*b
//   S3: p  <- (R1 - a) / t^3     (the divide is an exact shift, t = 4)
// S1 is executed on the rising edge that sees start high (from idle); S3 raises
// done. done and p hold until the next start; a start while busy is ignored.
// The three-state count follows the architecture; the split and the handshake
// are this design's.
//
// Ports: clk, rst_n (synchronous, active low), start, a..d in; p (Q23.8), done
// out. Latency: 3 edges from start to done.
module nf3_p
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
  output nf_fix_t    p,
  output logic       done
);
  initial assert (3 * LOG2_T <= FRAC) else $error("nf3_p: LOG2_T too large for FRAC");

  typedef enum logic [1:0] {ST_IDLE, ST_S2, ST_S3} state_t;
  state_t  state;
  nf_fix_t r1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      r1    <= '0;
      p     <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          r1    <= nf_fix_t'(d) - 3 * nf_fix_t'(c);
          done  <= 1'b0;
          state <= ST_S2;
        end
        ST_S2: begin
          r1    <= r1 + 3 * nf_fix_t'(b);
          state <= ST_S3;
        end
        ST_S3: begin
          p     <= nf_int_to_fix(r1 - nf_fix_t'(a)) >>> (3 * LOG2_T);
          done  <= 1'b1;
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end
endmodule
