// tb_lms_pe: self-checking testbench for the single-coefficient LMS cell.
//
// A cell with a 2-deep operand history is driven with random samples, partial
// sums and errors. Each clock the combinational output y_out = y_in + w*u is
// checked against a model in 64-bit integers, and after each clock the
// coefficient is checked against w + mu*u(two enabled clocks ago)*e. Clocks
// with en low must leave the history and weight alone; e_valid low must
// leave the weight alone.
module tb_lms_pe;
  import lms_pkg::*;

  localparam int HIST = 2;

  logic    clk = 1'b0, rst_n = 1'b0, en = 1'b0, mu_load = 1'b0, e_valid = 1'b0;
  mu_t     mu_in = '0;
  sample_t u_mul = '0;
  acc_t    y_in = '0, e = '0;
  acc_t    y_out;
  weight_t w;

  lms_pe #(.HIST(HIST)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sx(longint v, int bits);
    v = v & ((longint'(1) <<< bits) - 1);
    if (v[bits-1]) v = v - (longint'(1) <<< bits);
    return v;
  endfunction

  longint w_m = 0, mu_m = 3000;
  longint h [$];
  int n_upd = 0, n_hold = 0;

  initial begin : stimulus
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1; mu_load = 1'b1; mu_in = mu_t'(mu_m);
    @(negedge clk);
    mu_load = 1'b0; mu_in = '0;
    h = '{0, 0};
    for (int c = 0; c < 1000; c++) begin
      longint uu, yy, ee, q, m, exp_y;
      en      = ($urandom_range(0, 4) != 0);
      e_valid = ($urandom_range(0, 2) != 0);
      uu = longint'($urandom_range(0, 16383)) - 8192;
      yy = longint'($urandom_range(0, 65535)) - 32768;
      ee = longint'($urandom_range(0, 8191)) - 4096;
      u_mul = sample_t'(uu); y_in = acc_t'(yy); e = acc_t'(ee);
      #1;
      exp_y = sx(yy + ((w_m * uu) >>> 20), 24);
      checks++;
      if (longint'(y_out) != exp_y) begin
        failures++;
        $display("FAIL c=%0d y_out=%0d exp %0d", c, y_out, exp_y);
      end
      // expected update uses the sample HIST enabled clocks back
      if (en && e_valid) begin
        q = sx((mu_m * h[HIST-1]) >>> 15, 16);
        m = sx((q * ee) >>> 4, 24);
        w_m = sx(w_m + m, 24);
        n_upd++;
      end else n_hold++;
      if (en) begin
        h.push_front(uu);
        void'(h.pop_back());
      end
      @(posedge clk);
      #1;
      checks++;
      if (longint'(w) != w_m) begin
        failures++;
        $display("FAIL c=%0d w=%0d exp %0d", c, w, w_m);
      end
      @(negedge clk);
    end
    checks++;
    if (n_upd == 0 || n_hold == 0 || w_m == 0) failures++;
    $display("updates=%0d held=%0d", n_upd, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
