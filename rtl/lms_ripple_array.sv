// lms_ripple_array: LMS adaptive FIR filter as a chain of M cells in which the
// input samples are pipelined and the partial sums ripple.
//
// The input sample enters the leftmost cell and moves one cell to the right
// per sample through a delay element, so cell k (1..M) sees u(n-k+1) and
// holds coefficient w_k. Zero enters the rightmost cell as the initial
// partial sum; the sum ripples right to left through all cells inside one
// clock period and leaves the leftmost cell as y(n) in the same clock u(n)
// is presented. The error e(n) = d(n) - y(n) is broadcast to every cell,
// which updates w_k by mu*u(n-k+1)*e(n) at the clock edge. Coefficients are
// therefore updated without delay: the array reproduces the standard LMS
// filter exactly.
//
// Interface: u_in/d_in on in_valid, which also acts as the clock enable of
// the sample pipeline (a clock without in_valid leaves the array unchanged).
// y_out/e_out are valid (out_valid) in the same clock; latency 0.
// w_out lists the coefficients in tap order. The structure follows the
// document; the interface and number formats are this design's choice.
module lms_ripple_array
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
  acc_t    y_cell_in [M];
  acc_t    y_cell_out [M];
  sample_t u_dly [M-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < M-1; k++) u_dly[k] <= '0;
    end else if (in_valid) begin
      for (int k = 0; k < M-1; k++) u_dly[k] <= u_cell[k];
    end
  end

  for (genvar k = 0; k < M; k++) begin : g_cell
    assign u_cell[k]    = (k == 0) ? u_in : u_dly[(k == 0) ? 0 : k-1];
    assign y_cell_in[k] = (k == M-1) ? '0 : y_cell_out[(k == M-1) ? k : k+1];
    lms_pe #(.HIST(0)) u_pe (
      .clk, .rst_n, .en(in_valid), .mu_load, .mu_in,
      .u_mul(u_cell[k]), .y_in(y_cell_in[k]), .y_out(y_cell_out[k]),
      .e(e_out), .e_valid(out_valid), .w(w_out[k])
    );
  end

  assign y_out = y_cell_out[0];

  lms_error_unit #(.LAT(0)) u_err (
    .clk, .rst_n, .in_valid, .d_in, .y(y_out), .e(e_out), .out_valid
  );
endmodule
