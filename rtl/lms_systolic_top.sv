// lms_systolic_top: the six systolic realisations of the LMS adaptive FIR
// filter side by side.
//
//   index 0  lms_ripple_array  pipelined samples, rippling sums (exact LMS)
//   index 1  lms_bcast_array   broadcast samples, pipelined sums (M = 3)
//   index 2  lms_yfast_array   unidirectional, sums twice as fast as samples
//   index 3  lms_ufast_array   unidirectional, samples twice as fast as sums
//   index 4  lms_bidir_array   bidirectional, 2-slow or two interleaved signals
//   index 5  lms_fold_array    folded bidirectional, 100% utilization
//
// All arrays share the clock, the synchronous active-low reset and the
// step-size preload (mu_load/mu_in, mu in Q1.15); each has its own sample
// port (in_valid, u, d) and result port (out_valid, y, e) as arrays indexed
// as above, and its own coefficient outputs. Timing per array: see each
// module (latency 0 except yfast and ufast, M-1 samples; bidir and fold take
// a sample every other clock per signal).
module lms_systolic_top
  import lms_pkg::*;
#(
  parameter int M       = 8,   // taps of arrays 0, 2, 3, 4, 5
  parameter int M_BCAST = 3    // taps of the broadcast array (worked example)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    mu_load,
  input  mu_t     mu_in,
  input  logic    in_valid  [6],
  input  sample_t u_in      [6],
  input  sample_t d_in      [6],
  output logic    out_valid [6],
  output acc_t    y_out     [6],
  output acc_t    e_out     [6],
  output weight_t w_ripple  [M],
  output weight_t w_bcast   [M_BCAST],
  output weight_t w_yfast   [M],
  output weight_t w_ufast   [M],
  output weight_t w_bidir   [M],
  output weight_t w_fold    [M]
);
  lms_ripple_array #(.M(M)) u_ripple (
    .clk, .rst_n, .mu_load, .mu_in,
    .in_valid(in_valid[0]), .u_in(u_in[0]), .d_in(d_in[0]),
    .out_valid(out_valid[0]), .y_out(y_out[0]), .e_out(e_out[0]), .w_out(w_ripple));

  lms_bcast_array #(.M(M_BCAST)) u_bcast (
    .clk, .rst_n, .mu_load, .mu_in,
    .in_valid(in_valid[1]), .u_in(u_in[1]), .d_in(d_in[1]),
    .out_valid(out_valid[1]), .y_out(y_out[1]), .e_out(e_out[1]), .w_out(w_bcast));

  lms_yfast_array #(.M(M)) u_yfast (
    .clk, .rst_n, .mu_load, .mu_in,
    .in_valid(in_valid[2]), .u_in(u_in[2]), .d_in(d_in[2]),
    .out_valid(out_valid[2]), .y_out(y_out[2]), .e_out(e_out[2]), .w_out(w_yfast));

  lms_ufast_array #(.M(M)) u_ufast (
    .clk, .rst_n, .mu_load, .mu_in,
    .in_valid(in_valid[3]), .u_in(u_in[3]), .d_in(d_in[3]),
    .out_valid(out_valid[3]), .y_out(y_out[3]), .e_out(e_out[3]), .w_out(w_ufast));

  lms_bidir_array #(.M(M)) u_bidir (
    .clk, .rst_n, .mu_load, .mu_in,
    .in_valid(in_valid[4]), .u_in(u_in[4]), .d_in(d_in[4]),
    .out_valid(out_valid[4]), .y_out(y_out[4]), .e_out(e_out[4]), .w_out(w_bidir));

  lms_fold_array #(.M(M)) u_fold (
    .clk, .rst_n, .mu_load, .mu_in,
    .in_valid(in_valid[5]), .u_in(u_in[5]), .d_in(d_in[5]),
    .out_valid(out_valid[5]), .y_out(y_out[5]), .e_out(e_out[5]), .w_out(w_fold));
endmodule
