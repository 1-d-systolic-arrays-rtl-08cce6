// lms_fold_pe: two-coefficient cell of the folded bidirectional LMS array.
//
// The cell stores two coefficients, v and t, and sees two items each clock:
// p on the rightward (lower) line and r on the leftward (upper) line. Each
// item is tagged as an input sample or a partial sum. Per clock it executes
// one of two inner product steps, chosen by the type of p:
//   p is a sample : p' = p ,     r' = r + v*p
//   otherwise     : r' = r ,     p' = p + t*r
// (combinational; the delay elements are in the array). Both coefficients
// adapt with the broadcast error: v <= v + mu*uv*e and t <= t + mu*ut*e on
// e_valid, where uv (ut) is the sample v (t) multiplied HV (HT) clocks
// earlier, held in a local history. The cell function follows the document;
// the history depths, set by the cell's position, are this design's
// addition. mu is preloaded (mu_load). Synchronous active-low reset.
module lms_fold_pe
  import lms_pkg::*;
#(
  parameter int HV = 0,
  parameter int HT = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    mu_load,
  input  mu_t     mu_in,
  input  item_t   p_in,
  output item_t   p_out,
  input  item_t   r_in,
  output item_t   r_out,
  input  acc_t    e,
  input  logic    e_valid,
  output weight_t v,
  output weight_t t
);
  mu_t     mu_q;
  sample_t v_op, t_op;      // sample multiplied by v / t this clock (0 if idle)
  sample_t v_upd, t_upd;

  assign v_op = p_in.is_u  ? sample_t'(p_in.val) : '0;
  assign t_op = !p_in.is_u ? sample_t'(r_in.val) : '0;

  always_comb begin
    if (p_in.is_u) begin
      p_out = p_in;
      r_out = '{is_u: r_in.is_u, val: ips(r_in.val, v, v_op)};
    end else begin
      r_out = r_in;
      p_out = '{is_u: p_in.is_u, val: ips(p_in.val, t, t_op)};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       mu_q <= '0;
    else if (mu_load) mu_q <= mu_in;
  end

  if (HV == 0) begin : g_vnohist
    assign v_upd = v_op;
  end else begin : g_vhist
    sample_t hv [HV];
    always_ff @(posedge clk) begin
      if (!rst_n) for (int i = 0; i < HV; i++) hv[i] <= '0;
      else begin
        hv[0] <= v_op;
        for (int i = 1; i < HV; i++) hv[i] <= hv[i-1];
      end
    end
    assign v_upd = hv[HV-1];
  end

  if (HT == 0) begin : g_tnohist
    assign t_upd = t_op;
  end else begin : g_thist
    sample_t ht [HT];
    always_ff @(posedge clk) begin
      if (!rst_n) for (int i = 0; i < HT; i++) ht[i] <= '0;
      else begin
        ht[0] <= t_op;
        for (int i = 1; i < HT; i++) ht[i] <= ht[i-1];
      end
    end
    assign t_upd = ht[HT-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v <= '0;
      t <= '0;
    end else if (e_valid) begin
      v <= v + lms_corr(mu_q, v_upd, e);
      t <= t + lms_corr(mu_q, t_upd, e);
    end
  end
endmodule
