// tb_lms_bidir_array: self-checking testbench for lms_bidir_array (2-slow bidirectional, then two interleaved signals).
//
// Drives 900 samples of a random input signal whose desired response comes
// from a fixed unknown FIR system, with step size mu = 1/16. Every output
// (y, e) is compared with lms_ref_pkg, a behavioural model of the same
// algorithm in 64-bit arithmetic, as are the final coefficients. Also
// checked: the output timing (latency 0 samples), that the error shrinks
// as the filter adapts, and, where the array can stall, that stalled clocks
// change nothing. Pattern: nil slots between samples for the first 300 samples, then a second signal u* in those slots.
module tb_lms_bidir_array;
  import lms_pkg::*;
  import lms_ref_pkg::*;

  localparam int M   = 8;
  localparam int S   = 2;
  localparam int LAT = 0;
  localparam int NS  = 900;

  logic    clk = 1'b0, rst_n = 1'b0, mu_load = 1'b0;
  mu_t     mu_in = '0;
  logic    in_valid = 1'b0;
  sample_t u_in = '0, d_in = '0;
  logic    out_valid;
  acc_t    y_out, e_out;
  weight_t w_out [M];

  lms_bidir_array #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  initial begin : watchdog
    repeat (20 * NS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // Unknown system to identify: its first M of these taps, Q12.
  longint h [8] = '{1200, -700, 450, 300, -250, 150, -90, 60};
  longint hist_a [$], hist_b [$];

  function automatic longint plant(ref longint hq [$], longint u);
    longint acc;
    hq.push_front(u);
    if (hq.size() > 8) void'(hq.pop_back());
    acc = 0;
    foreach (hq[i]) if (i < M) acc += h[i] * hq[i];
    return sx(acc >>> 12, 16);
  endfunction

  lms_ref  rm;
  longint  exp_y [$], exp_e [$];
  int      exp_item [$];
  int      items = 0, accepted = 0, outputs = 0, last_item = -1;
  int      first_out_at = -1, stalls = 0, dual_outputs = 0;
  bit      dual_mode = 1'b0;
  longint  err_early = 0, err_late = 0;

  initial begin : stimulus
    int lags [];
    longint uu, dd;
    bit     vv;
    lags = new[M];
    foreach (lags[i]) lags[i] = i;
    rm = new(M, S, lags, 4096);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1; mu_load = 1'b1; mu_in = 16'sd4096;
    @(negedge clk);
    mu_load = 1'b0;
    while (accepted < NS) begin
      // nil slot on every other clock first (2-slow), then a second signal in them
      vv = (accepted < 300) ? cycle[0] == 1'b0 : 1'b1;
      dual_mode = (accepted >= 300);
      in_valid = vv;
      uu = (longint'($urandom_range(0, 4095)) - 2048);
      dd = vv ? ((vv && dual_mode && cycle[0]) ? plant(hist_b, uu) : plant(hist_a, uu)) : 0;
      u_in = sample_t'(uu);
      d_in = sample_t'(dd);
      rm.push(uu, dd, vv);
      if (vv) begin
        exp_y.push_back(rm.y[items]); exp_e.push_back(rm.e[items]); exp_item.push_back(items);
      end
      items++;
      #1;
      // outputs of this clock
      check(out_valid == in_valid, "out_valid timing");
      if (out_valid && dual_mode) dual_outputs++;
      if (out_valid) begin
        if (exp_y.size() == 0) check(1'b0, "output with nothing expected");
        else begin
          longint ey, ee;
          int     it;
          ey = exp_y.pop_front(); ee = exp_e.pop_front(); it = exp_item.pop_front();
          check(longint'(y_out) == ey, $sformatf("y=%0d exp %0d (output %0d)", y_out, ey, outputs));
          check(longint'(e_out) == ee, $sformatf("e=%0d exp %0d (output %0d)", e_out, ee, outputs));
          if (first_out_at < 0) first_out_at = accepted;
          if (outputs < NS/4)    err_early += (ee < 0) ? -ee : ee;
          if (outputs >= NS*3/4) err_late  += (ee < 0) ? -ee : ee;
          outputs++;
          last_item = it;
        end
      end
      if (vv) accepted++;
      else stalls++;
      @(posedge clk);
      @(negedge clk);
      cycle++;
    end
    in_valid = 1'b0;
    #1;
    check(first_out_at == LAT, $sformatf("first output after %0d samples, expected %0d", first_out_at, LAT));
    check(outputs == NS - LAT, $sformatf("%0d outputs, expected %0d", outputs, NS - LAT));
    for (int i = 0; i < M; i++)
      check(longint'(w_out[i]) == rm.wsnap[last_item + 1][i],
            $sformatf("w[%0d]=%0d exp %0d", i, w_out[i], rm.wsnap[last_item + 1][i]));
    check(err_late * 4 < err_early, $sformatf("error did not shrink: %0d -> %0d", err_early, err_late));
    check(stalls > 0, "no nil slot exercised");
    check(dual_outputs > 0, "two-signal mode never ran");
    $display("samples=%0d outputs=%0d idle_clocks=%0d |e| first quarter=%0d last quarter=%0d",
             accepted, outputs, stalls, err_early, err_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
