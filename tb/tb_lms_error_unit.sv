// tb_lms_error_unit: self-checking testbench for the error subtractor with a
// 3-sample alignment delay on d.
//
// Random d and y values are pushed with random gaps in in_valid. Checked every
// clock: e = d(pushed 3 samples earlier) - y, computed in 64-bit integers, and
// out_valid = in_valid once 3 samples have been pushed since reset.
module tb_lms_error_unit;
  import lms_pkg::*;

  localparam int LAT = 3;

  logic    clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  sample_t d_in = '0;
  acc_t    y = '0;
  acc_t    e;
  logic    out_valid;

  lms_error_unit #(.LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint dq [$];
  int pushed = 0, valid_seen = 0;

  initial begin : stimulus
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 500; c++) begin
      longint dd, yy;
      in_valid = ($urandom_range(0, 3) != 0);
      dd = longint'($urandom_range(0, 65535)) - 32768;
      yy = longint'($urandom_range(0, 1 << 20)) - (1 << 19);
      d_in = sample_t'(dd); y = acc_t'(yy);
      #1;
      checks++;
      if (out_valid != (in_valid && pushed >= LAT)) begin
        failures++;
        $display("FAIL c=%0d out_valid=%0b", c, out_valid);
      end
      if (out_valid) begin
        valid_seen++;
        checks++;
        if (longint'(e) != dq[LAT-1] - yy) begin
          failures++;
          $display("FAIL c=%0d e=%0d exp %0d", c, e, dq[LAT-1] - yy);
        end
      end
      if (in_valid) begin
        dq.push_front(dd);
        pushed++;
      end
      @(negedge clk);
    end
    checks++;
    if (valid_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
