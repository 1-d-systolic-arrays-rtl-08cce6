// lms_error_unit: the subtractor that closes the LMS loop, e(n) = d(n) - y(n).
//
// The desired sample d(n) is presented together with u(n) (in_valid); when the
// array delivers y(n) LAT samples later, d is delayed by LAT enabled clocks so
// the two meet. out_valid rises once LAT samples have been pushed since reset
// and then follows in_valid; it also gates the coefficient updates of the
// array, so pipeline contents left from before reset never adapt the filter.
// The subtractor is the document's; the d delay line and the valid logic are
// this design's choice of interface. With LAT = 0 the unit is purely
// combinational and clk/rst_n are unused.
module lms_error_unit
  import lms_pkg::*;
#(
  parameter int LAT = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t d_in,
  input  acc_t    y,
  output acc_t    e,
  output logic    out_valid
);
  sample_t d_al;
  logic    primed;

  if (LAT == 0) begin : g_direct
    assign d_al   = d_in;
    assign primed = 1'b1;
  end else begin : g_delay
    sample_t dly [LAT];
    logic [$clog2(LAT+1)-1:0] cnt;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < LAT; i++) dly[i] <= '0;
        cnt <= '0;
      end else if (in_valid) begin
        dly[0] <= d_in;
        for (int i = 1; i < LAT; i++) dly[i] <= dly[i-1];
        if (cnt != LAT[$bits(cnt)-1:0]) cnt <= cnt + 1'b1;
      end
    end
    assign d_al   = dly[LAT-1];
    assign primed = (cnt == LAT[$bits(cnt)-1:0]);
  end

  assign e         = acc_t'(d_al) - y;
  assign out_valid = in_valid & primed;
endmodule
