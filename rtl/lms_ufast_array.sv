// lms_ufast_array: unidirectional systolic LMS array in which the input
// samples move twice as fast as the partial sums.
//
// Input samples and partial sums both travel left to right, the sample line
// with one delay element between neighbouring cells and the sum line with
// two. Zero enters the leftmost cell as the initial sum. The sum of output
// sample n meets u(n-M+1) in cell 1, u(n-M+2) in cell 2, ..., u(n) in cell
// M, and leaves the rightmost cell in the clock u(n+M-1) enters: a latency
// of M-1 samples. Cell k therefore holds the coefficient of tap M-k+1;
// w_out lists the coefficients in tap order (w_out[0] belongs to the
// rightmost cell). The error e(n) = d(n) - y(n) is formed at the right end
// and broadcast. Cell k used its coefficient for y(n) 2(M-k) samples before
// e(n) exists; a local history of that depth supplies the sample it
// multiplied (this design's addition).
//
// Interface: u_in/d_in on in_valid, which also enables all delay elements;
// y_out/e_out for sample n appear, with out_valid, in the clock sample n+M-1
// is presented.
module lms_ufast_array
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
  weight_t w_cell [M];
  sample_t u_dly [M-1];     // feeds cell k+1
  acc_t    y_d1  [M-1];
  acc_t    y_d2  [M-1];     // feeds cell k+1

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < M-1; k++) begin
        u_dly[k] <= '0; y_d1[k] <= '0; y_d2[k] <= '0;
      end
    end else if (in_valid) begin
      for (int k = 0; k < M-1; k++) begin
        u_dly[k] <= u_cell[k];
        y_d1[k]  <= y_cell_out[k];
        y_d2[k]  <= y_d1[k];
      end
    end
  end

  for (genvar k = 0; k < M; k++) begin : g_cell
    assign u_cell[k]    = (k == 0) ? u_in : u_dly[(k == 0) ? 0 : k-1];
    assign y_cell_in[k] = (k == 0) ? '0   : y_d2[(k == 0) ? 0 : k-1];
    lms_pe #(.HIST(2*(M-1-k))) u_pe (
      .clk, .rst_n, .en(in_valid), .mu_load, .mu_in,
      .u_mul(u_cell[k]), .y_in(y_cell_in[k]), .y_out(y_cell_out[k]),
      .e(e_out), .e_valid(out_valid), .w(w_cell[k])
    );
    assign w_out[k] = w_cell[M-1-k];
  end

  assign y_out = y_cell_out[M-1];

  lms_error_unit #(.LAT(M-1)) u_err (
    .clk, .rst_n, .in_valid, .d_in, .y(y_out), .e(e_out), .out_valid
  );
endmodule
