// lms_bcast_array: semi-systolic LMS array with broadcast input samples,
// stationary coefficients and pipelined partial sums (the Method 1 array).
//
// u(n) is broadcast to all M cells in the same clock. Zero enters the
// rightmost cell (coefficient w_M) as the initial partial sum; each cell adds
// w_k*u and passes the sum leftwards through one delay element, so the sum
// leaving the leftmost cell (w_1) in the clock u(n) is presented is
//     y(n) = sum_k w_k * u(n-k+1),
// with w_k taken k-1 samples earlier (a transposed-form filter). The error
// e(n) = d(n) - y(n) is broadcast to all cells. Cell k keeps the last k-1
// broadcast samples in a local history so that its update uses u(n-k+1), the
// sample it multiplied for y(n); coefficient k thus lags the errors by k-1
// samples. The local history is this design's addition.
//
// Interface: u_in/d_in on in_valid, which also enables the delay elements.
// y_out/e_out/out_valid in the same clock (latency 0). w_out in tap order.
// Default M = 3 is the document's worked example.
module lms_bcast_array
  import lms_pkg::*;
#(
  parameter int M = 3
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
  acc_t y_cell_in  [M];
  acc_t y_cell_out [M];
  acc_t y_dly      [M-1];   // y_dly[k] feeds cell k, holds cell k+1's sum

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < M-1; k++) y_dly[k] <= '0;
    end else if (in_valid) begin
      for (int k = 0; k < M-1; k++) y_dly[k] <= y_cell_out[k+1];
    end
  end

  for (genvar k = 0; k < M; k++) begin : g_cell
    assign y_cell_in[k] = (k == M-1) ? '0 : y_dly[(k == M-1) ? 0 : k];
    lms_pe #(.HIST(k)) u_pe (
      .clk, .rst_n, .en(in_valid), .mu_load, .mu_in,
      .u_mul(u_in), .y_in(y_cell_in[k]), .y_out(y_cell_out[k]),
      .e(e_out), .e_valid(out_valid), .w(w_out[k])
    );
  end

  assign y_out = y_cell_out[0];

  lms_error_unit #(.LAT(0)) u_err (
    .clk, .rst_n, .in_valid, .d_in, .y(y_out), .e(e_out), .out_valid
  );
endmodule
