// lms_pkg: number formats and the fixed-point arithmetic shared by every
// LMS systolic cell and array.
//
// All quantities are two's-complement fixed point:
//   u, d   : DW = 16 bits, F  = 12 fraction bits (range +-8)
//   y, e   : AW = 24 bits, F  = 12 fraction bits (headroom for the sum of M products)
//   w      : WW = 24 bits, WF = 20 fraction bits (weights carry more fraction bits
//            than the data, which keeps small LMS corrections from vanishing)
//   mu     : MUW = 16 bits, MF = 15 fraction bits (Q1.15, 0 <= mu < 1)
// Arithmetic wraps and truncates (arithmetic shift right, no rounding and no
// saturation). The widths are this design's choice; the cell operations
// (q := mu*u, m := q*e, w := w + m, y' := y + w*u) are the inner product step
// with coefficient update of the LMS cell.
package lms_pkg;
  localparam int DW  = 16;
  localparam int F   = 12;
  localparam int AW  = 24;
  localparam int WW  = 24;
  localparam int WF  = 20;
  localparam int MUW = 16;
  localparam int MF  = 15;

  typedef logic signed [DW-1:0]  sample_t;  // u, d
  typedef logic signed [AW-1:0]  acc_t;     // y, e, partial sums
  typedef logic signed [WW-1:0]  weight_t;  // filter coefficients
  typedef logic signed [MUW-1:0] mu_t;      // step size

  // Item travelling through the folded (100% utilization) array: either an
  // input sample or a partial output sum, told apart by a tag.
  typedef struct packed {
    logic is_u;   // 1: input sample u, 0: partial sum y
    acc_t val;    // sample (sign-extended) or partial sum
  } item_t;

  // Inner product step: y + w*u, the product brought back to F fraction bits.
  function automatic acc_t ips(acc_t y, weight_t w, sample_t u);
    logic signed [WW+DW-1:0] p;
    p = w * u;
    return y + acc_t'(p >>> WF);
  endfunction

  // LMS correction m = (mu*u)*e: q = mu*u at F fraction bits, m at WF bits.
  function automatic weight_t lms_corr(mu_t mu, sample_t u, acc_t e);
    logic signed [MUW+DW-1:0] qp;
    sample_t                  q;
    logic signed [DW+AW-1:0]  mp;
    qp = mu * u;
    q  = sample_t'(qp >>> MF);
    mp = q * e;
    return weight_t'(mp >>> (2*F - WF));
  endfunction
endpackage
