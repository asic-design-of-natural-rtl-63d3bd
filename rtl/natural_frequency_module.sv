// natural_frequency_module: the natural-frequency (omega^2) feature extractor
// for atrial-fibrillation detection in its three architectures, side by side.
//
// Each architecture computes, for a window of five ECG samples a..e
// (x_n .. x_{n-4}), the finite-difference derivatives
//   m = (b - a)/t,  n = (c - 2b + a)/t^2,  p = (d - 3c + 3b - a)/t^3,
//   q = (e - 4d + 6c - 4b + a)/t^4
// and w = (n*q - p*p)/(m*p - n*n), the squared natural frequency of a
// second-order system fitted to the window.
//   Design 1 (nf1_top): single cycle, t a run-time input (multipliers and
//                       dividers by t); w half a cycle after the rising edge.
//   Design 2 (nf2_top): single cycle, t = 4 built in (shifts); same timing.
//                       The preferred architecture.
//   Design 3 (nf3_top): multi-cycle, one multiplier/divider and one
//                       adder/subtractor per module and state; 11 cycles per
//                       window, start/done handshake.
// The three share clock and reset and nothing else: each has its own inputs and
// outputs so they can be exercised and compared independently.
//
// Ports: clk, rst_n (synchronous, active low); d1_x, d1_t -> d1_y;
// d2_x -> d2_y; d3_start, d3_x -> d3_y, d3_done, d3_busy.
module natural_frequency_module
  import nf_pkg::*;
#(
  parameter int unsigned LOG2_T = 2   // t = 2**LOG2_T for Designs 2 and 3
) (
  input  logic       clk,
  input  logic       rst_n,
  // Design 1
  input  nf_window_t d1_x,
  input  nf_t_t      d1_t,
  output nf_result_t d1_y,
  // Design 2
  input  nf_window_t d2_x,
  output nf_result_t d2_y,
  // Design 3
  input  logic       d3_start,
  input  nf_window_t d3_x,
  output nf_result_t d3_y,
  output logic       d3_done,
  output logic       d3_busy
);
  nf1_top u_design1 (.clk, .rst_n, .x(d1_x), .t(d1_t), .y(d1_y));

  nf2_top #(.LOG2_T(LOG2_T)) u_design2 (.clk, .rst_n, .x(d2_x), .y(d2_y));

  nf3_top #(.LOG2_T(LOG2_T)) u_design3 (.clk, .rst_n, .start(d3_start), .x(d3_x), .y(d3_y),
                                        .done(d3_done), .busy(d3_busy));
endmodule
