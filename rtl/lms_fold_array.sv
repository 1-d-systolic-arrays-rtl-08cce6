// lms_fold_array: folded bidirectional LMS array with 100% cell utilization,
// M/2 cells of two coefficients each for an M-tap filter (M even, M >= 4).
//
// Input samples and zero-valued partial sums enter the leftmost cell
// interleaved on the lower line: a sample on each clock with in_valid, a
// fresh zero sum on each clock between. Items move one cell to the right per
// clock, pass one delay element at the right end, and come back on the upper
// line one cell per clock to the left. Wherever a rightward item meets a
// leftward one they are always one sample and one sum, so every cell does a
// useful step every clock (lms_fold_pe): a sum meets all M samples that
// entered within M-1 clocks before or after it. The sum that leaves the
// leftmost cell in the clock u(n) enters is
//     y(n) = sum_{i=1..M} w_i u(n-i+1)
// where cell j (0..M/2-1, from the left) holds v = w_{j+1} for the samples
// newer than the sum and t = w_{M-j} for the older ones. Latency 0.
//
// e(n) = d(n) - y(n) is formed at the left end and broadcast; coefficient
// w_i was used i-1 clocks before its error exists, which sets the cell's
// history depths HV = j and HT = M-1-j.
//
// Interface: in_valid must be high on exactly every other clock (a sample
// rate of half the clock, the price of 100% utilization); an assertion checks
// this. out_valid = in_valid. w_out is in tap order.
module lms_fold_array
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
  localparam int N = M / 2;

  item_t   p_in [N], p_out [N], r_in [N], r_out [N];
  item_t   p_dly [N-1];         // p_dly[j] holds cell j's rightward output
  item_t   r_dly [N];           // r_dly[j] feeds cell j from the right
  weight_t v_cell [N], t_cell [N];
  item_t   inj;

  assign inj = in_valid ? '{is_u: 1'b1, val: acc_t'(u_in)} : '{is_u: 1'b0, val: '0};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < N-1; j++) p_dly[j] <= '0;
      for (int j = 0; j < N; j++)   r_dly[j] <= '0;
    end else begin
      for (int j = 0; j < N-1; j++) p_dly[j] <= p_out[j];
      for (int j = 0; j < N-1; j++) r_dly[j] <= r_out[j+1];
      r_dly[N-1] <= p_out[N-1];   // the loop delay at the right end
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_cell
    assign p_in[j] = (j == 0) ? inj : p_dly[(j == 0) ? 0 : j-1];
    assign r_in[j] = r_dly[j];
    lms_fold_pe #(.HV(j), .HT(M-1-j)) u_pe (
      .clk, .rst_n, .mu_load, .mu_in,
      .p_in(p_in[j]), .p_out(p_out[j]), .r_in(r_in[j]), .r_out(r_out[j]),
      .e(e_out), .e_valid(out_valid), .v(v_cell[j]), .t(t_cell[j])
    );
    assign w_out[j]     = v_cell[j];
    assign w_out[M-1-j] = t_cell[j];
  end

  assign y_out = r_out[0].val;

  lms_error_unit #(.LAT(0)) u_err (
    .clk, .rst_n, .in_valid, .d_in, .y(y_out), .e(e_out), .out_valid
  );

  // Samples must arrive on alternate clocks.
  logic prev_valid, started;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_valid <= 1'b0;
      started    <= 1'b0;
    end else begin
      prev_valid <= in_valid;
      started    <= started | in_valid;
    end
  end
  a_alternate: assert property (@(posedge clk) disable iff (!rst_n)
                                started |-> (in_valid != prev_valid));
endmodule
