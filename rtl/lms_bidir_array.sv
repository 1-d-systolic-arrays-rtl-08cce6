// lms_bidir_array: bidirectional systolic LMS array (2-slow), optionally
// running two interleaved signals on one coefficient set.
//
// Input samples travel left to right and partial sums right to left, each
// through one delay element between neighbouring cells. Zero enters the
// rightmost cell as the initial sum every clock. Because the two streams move
// in opposite directions, a sum meets every second sample, so consecutive
// samples of one signal must be two clocks apart: the sum leaving the
// leftmost cell in the clock u(n) enters has met u(n-k+1) in cell k (cell k
// holds w_k), i.e. y(n) = sum_k w_k u(n-k+1), latency 0.
//
// The clocks in between are either nil slots (in_valid = 0, the 2-slow
// algorithm: u is forced to zero and no error is applied) or carry a second
// signal u*, d* (in_valid = 1 every clock) which is filtered by, and adapts,
// the same coefficients, filling the array completely. The error
// e = d - y of every valid output is broadcast to all cells. Cell k used its
// coefficient for the current output k-1 clocks before; a local history of
// that depth supplies the sample for the update (this design's addition).
//
// The array runs every clock (no stall); out_valid = in_valid. w_out is in
// tap order.
module lms_bidir_array
  import lms_pkg::*;
#(
  parameter int M = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    mu_load,
  input  mu_t     mu_in,
  input  logic    in_valid,
  input  sample_t u_in,
  input  sample_t d_in,
  output logic    out_valid,
  output acc_t    y_out,
  output acc_t    e_out,
  output weight_t w_out [M]
);
  sample_t u_cell [M];
  acc_t    y_cell_in  [M];
  acc_t    y_cell_out [M];
  sample_t u_dly [M-1];     // feeds cell k+1
  acc_t    y_dly [M-1];     // feeds cell k, holds cell k+1's sum

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < M-1; k++) begin
        u_dly[k] <= '0; y_dly[k] <= '0;
      end
    end else begin
      for (int k = 0; k < M-1; k++) begin
        u_dly[k] <= u_cell[k];
        y_dly[k] <= y_cell_out[k+1];
      end
    end
  end

  for (genvar k = 0; k < M; k++) begin : g_cell
    assign u_cell[k]    = (k == 0) ? (in_valid ? u_in : '0) : u_dly[(k == 0) ? 0 : k-1];
    assign y_cell_in[k] = (k == M-1) ? '0 : y_dly[(k == M-1) ? 0 : k];
    lms_pe #(.HIST(k)) u_pe (
      .clk, .rst_n, .en(1'b1), .mu_load, .mu_in,
      .u_mul(u_cell[k]), .y_in(y_cell_in[k]), .y_out(y_cell_out[k]),
      .e(e_out), .e_valid(out_valid), .w(w_out[k])
    );
  end

  assign y_out = y_cell_out[0];

  lms_error_unit #(.LAT(0)) u_err (
    .clk, .rst_n, .in_valid, .d_in, .y(y_out), .e(e_out), .out_valid
  );
endmodule
