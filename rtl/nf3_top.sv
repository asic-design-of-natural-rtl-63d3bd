// nf3_top: NaturalFrequencyModule of Design 3, the multi-cycle "fully
// constrained" architecture: every module uses a single multiplier/divider and
// a single adder/subtractor per state, trading time for area.
//
// Operation (11 rising edges from the edge that samples start to done):
//   edge 1       the window a..e is stored in the input registers
//   edges 2-5    m-, n-, p-, q-modules run concurrently (1, 2, 3, 4 states);
//                the controller waits until all four report done, which
//                synchronises them on the slowest (q)
//   edges 6-10   w-module, 5 states
//   edge 11      done rises; y holds the result until the next start
// start is accepted when idle (including after done); a start while an
// operation is in flight is ignored and busy stays high. The state counts and
// the 11-cycle operation follow the architecture; the handshake and the
// controller are this design's. All registers use the rising edge.
//
// Ports: clk, rst_n (synchronous, active low), start, x (window) in; y (m, n,
// p, q, w, w_err), done, busy out.
module nf3_top
  import nf_pkg::*;
#(
  parameter int unsigned LOG2_T = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  nf_window_t x,
  output nf_result_t y,
  output logic       done,
  output logic       busy
);
  typedef enum logic [1:0] {ST_IDLE, ST_MNPQ, ST_W} state_t;
  state_t     state;
  nf_window_t xr;          // input registers (R1..R5 of the architecture)
  logic       mnpq_go;     // one-cycle start pulse to the m/n/p/q-modules
  logic       w_go;        // start to the w-module
  logic       m_done, n_done, p_done, q_done, w_done;
  nf_fix_t    m, n, p, q;
  nf_w_t      w;
  logic       w_err;

  nf3_m #(.LOG2_T(LOG2_T)) u_m (.clk, .rst_n, .start(mnpq_go), .a(xr.a), .b(xr.b),
                                .m(m), .done(m_done));
  nf3_n #(.LOG2_T(LOG2_T)) u_n (.clk, .rst_n, .start(mnpq_go), .a(xr.a), .b(xr.b), .c(xr.c),
                                .n(n), .done(n_done));
  nf3_p #(.LOG2_T(LOG2_T)) u_p (.clk, .rst_n, .start(mnpq_go), .a(xr.a), .b(xr.b), .c(xr.c),
                                .d(xr.d), .p(p), .done(p_done));
  nf3_q #(.LOG2_T(LOG2_T)) u_q (.clk, .rst_n, .start(mnpq_go), .a(xr.a), .b(xr.b), .c(xr.c),
                                .d(xr.d), .e(xr.e), .q(q), .done(q_done));
  nf3_w u_w (.clk, .rst_n, .start(w_go), .m, .n, .p, .q, .w, .w_err, .done(w_done));

  // The derivative modules' done flags are stale during the cycle of the
  // start pulse, so they are only looked at once the pulse has gone.
  always_comb w_go = (state == ST_MNPQ) && !mnpq_go && m_done && n_done && p_done && q_done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      xr      <= '0;
      mnpq_go <= 1'b0;
      done    <= 1'b0;
    end else begin
      mnpq_go <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          xr      <= x;
          mnpq_go <= 1'b1;
          done    <= 1'b0;
          state   <= ST_MNPQ;
        end
        ST_MNPQ: if (w_go) state <= ST_W;
        ST_W: if (w_done) begin
          done  <= 1'b1;
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb busy = (state != ST_IDLE);
  always_comb y = '{m: m, n: n, p: p, q: q, w: w, w_err: w_err};

  // The w-module must only be started with all four derivatives ready.
  a_w_go_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                 w_go |-> (m_done && n_done && p_done && q_done));
  // done and busy are never high together.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
