// lms_yfast_array: unidirectional systolic LMS array in which the partial sums
// move twice as fast as the input samples.
//
// Input samples and partial sums both travel left to right. The sample line
// has two delay elements between neighbouring cells, the sum line one. Zero
// enters the leftmost cell as the initial sum of each output sample; that sum
// meets u(n) in cell 1, u(n-1) in cell 2, ..., u(n-M+1) in cell M (cell k
// holds w_k) and leaves the rightmost cell M-1 samples after u(n) entered:
// the array has a latency of M-1 samples. The error e(n) = d(n) - y(n) is
// formed at the right end (d(n) delayed by M-1 samples to meet y(n)) and
// broadcast to all cells. Cell k used its coefficient for y(n) M-k samples
// before e(n) exists; a local history of that depth supplies u(n-k+1) for
// the update (this design's addition).
//
// Interface: u_in/d_in on in_valid, which also enables all delay elements;
// y_out/e_out for sample n appear, with out_valid, in the clock sample n+M-1
// is presented. w_out in tap order.
module lms_yfast_array
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
  sample_t u_d1 [M-1];      // first delay after cell k
  sample_t u_d2 [M-1];      // second delay, feeds cell k+1
  acc_t    y_dly [M-1];     // feeds cell k+1

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < M-1; k++) begin
        u_d1[k] <= '0; u_d2[k] <= '0; y_dly[k] <= '0;
      end
    end else if (in_valid) begin
      for (int k = 0; k < M-1; k++) begin
        u_d1[k]  <= u_cell[k];
        u_d2[k]  <= u_d1[k];
        y_dly[k] <= y_cell_out[k];
      end
    end
  end

  for (genvar k = 0; k < M; k++) begin : g_cell
    assign u_cell[k]    = (k == 0) ? u_in : u_d2[(k == 0) ? 0 : k-1];
    assign y_cell_in[k] = (k == 0) ? '0   : y_dly[(k == 0) ? 0 : k-1];
    lms_pe #(.HIST(M-1-k)) u_pe (
      .clk, .rst_n, .en(in_valid), .mu_load, .mu_in,
      .u_mul(u_cell[k]), .y_in(y_cell_in[k]), .y_out(y_cell_out[k]),
      .e(e_out), .e_valid(out_valid), .w(w_out[k])
    );
  end

  assign y_out = y_cell_out[M-1];

  lms_error_unit #(.LAT(M-1)) u_err (
    .clk, .rst_n, .in_valid, .d_in, .y(y_out), .e(e_out), .out_valid
  );
endmodule
