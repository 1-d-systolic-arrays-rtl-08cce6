// lms_pe: one processing element of the LMS systolic arrays, holding a single
// filter coefficient w.
//
// Each clock period the cell performs the inner product step
//     y_out = y_in + w * u_mul                          (combinational)
// and, when the broadcast error is valid, the coefficient update
//     q = mu * u_upd ;  m = q * e ;  w <= w + m          (registered)
// mu is preloaded into the cell (mu_load) and then held.
//
// u_upd is u_mul delayed by HIST enabled clocks through a local shift
// register. In a pipelined array the error for an output sample arrives some
// clocks after the cell used its coefficient for that sample; HIST is that
// distance, so the update pairs e(n) with the sample the cell multiplied for
// y(n). The local history is this design's addition; the cell function and
// the preloaded step size follow the document's cell procedure. HIST = 0
// gives the plain cell.
//
// en advances the history (a clock enable shared with the array's delay
// elements); the weight updates on en & e_valid. Reset (synchronous, active
// low) clears the weight, mu and the history.
module lms_pe
  import lms_pkg::*;
#(
  parameter int HIST = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    mu_load,
  input  mu_t     mu_in,
  input  sample_t u_mul,
  input  acc_t    y_in,
  output acc_t    y_out,
  input  acc_t    e,
  input  logic    e_valid,
  output weight_t w
);
  mu_t     mu_q;
  sample_t u_upd;

  always_ff @(posedge clk) begin
    if (!rst_n)       mu_q <= '0;
    else if (mu_load) mu_q <= mu_in;
  end

  if (HIST == 0) begin : g_nohist
    assign u_upd = u_mul;
  end else begin : g_hist
    sample_t hist [HIST];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < HIST; i++) hist[i] <= '0;
      end else if (en) begin
        hist[0] <= u_mul;
        for (int i = 1; i < HIST; i++) hist[i] <= hist[i-1];
      end
    end
    assign u_upd = hist[HIST-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)               w <= '0;
    else if (en && e_valid)   w <= w + lms_corr(mu_q, u_upd, e);
  end

  assign y_out = ips(y_in, w, u_mul);
endmodule
