// tb_lms_long_filter: the six LMS systolic arrays as long filters, 256
// coefficients each, the size range of "several hundred coefficients" that
// word-level systolic LMS arrays are meant for.
//
// Same stimulus and checks as tb_lms_systolic_top (every y and e bit-exact
// against lms_ref_pkg, final coefficients, latency of M-1 samples on the
// unidirectional arrays, stalls, nil slots, second signal, partial-sum
// injection), with mu = 1/64 to keep the long filters stable. The unknown
// system has 8 taps, so 248 coefficients of each array must stay near zero
// while the first 8 converge; with 256 coefficients adapting that is slow, so
// the check here is only that the mean |e| of the last quarter of the run is
// below that of the first quarter.
module tb_lms_long_filter;
  import lms_pkg::*;
  import lms_ref_pkg::*;

  localparam int M  = 256;
  localparam int MB = 256;
  localparam int NS = 3000;              // samples per signal

  logic    clk = 1'b0, rst_n = 1'b0, mu_load = 1'b0;
  mu_t     mu_in = '0;
  logic    in_valid  [6];
  sample_t u_in      [6];
  sample_t d_in      [6];
  logic    out_valid [6];
  acc_t    y_out     [6];
  acc_t    e_out     [6];
  weight_t w_ripple [M], w_bcast [MB], w_yfast [M], w_ufast [M], w_bidir [M], w_fold [M];

  lms_systolic_top #(.M(M), .M_BCAST(MB)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;

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

  longint h [8] = '{1200, -700, 450, 300, -250, 150, -90, 60};
  longint hq [6][2][$];                  // plant histories per array and signal

  function automatic longint plant(int a, int ch, int taps, longint u);
    longint acc;
    hq[a][ch].push_front(u);
    if (hq[a][ch].size() > 8) void'(hq[a][ch].pop_back());
    acc = 0;
    foreach (hq[a][ch][i]) if (i < taps) acc += h[i] * hq[a][ch][i];
    return sx(acc >>> 12, 16);
  endfunction

  localparam int TAPS [6] = '{M, MB, M, M, M, M};
  localparam int LATS [6] = '{0, 0, M-1, M-1, 0, 0};

  lms_ref  rm [6];
  longint  exp_y [6][$], exp_e [6][$];
  int      exp_item [6][$];
  int      items [6], accepted [6], outputs [6], last_item [6], first_out [6];
  longint  err_early [6], err_late [6];
  int      n_stall = 0, n_nil = 0, n_dual = 0, n_inject = 0, n_latency = 0;

  function automatic weight_t w_of(int a, int i);
    case (a)
      0: return w_ripple[i];
      1: return w_bcast[i];
      2: return w_yfast[i];
      3: return w_ufast[i];
      4: return w_bidir[i];
      default: return w_fold[i];
    endcase
  endfunction

  function automatic bit all_done();
    foreach (accepted[a]) if (accepted[a] < NS) return 1'b0;
    return 1'b1;
  endfunction

  initial begin : stimulus
    for (int a = 0; a < 6; a++) begin
      int lags [];
      lags = new[TAPS[a]];
      foreach (lags[i])
        case (a)
          0: lags[i] = 0;
          1: lags[i] = i;
          2: lags[i] = M-1-i;
          3: lags[i] = 2*i;
          default: lags[i] = i;
        endcase
      rm[a] = new(TAPS[a], (a >= 4) ? 2 : 1, lags, 512);
      items[a] = 0; accepted[a] = 0; outputs[a] = 0; last_item[a] = -1; first_out[a] = -1;
      err_early[a] = 0; err_late[a] = 0;
      in_valid[a] = 1'b0; u_in[a] = '0; d_in[a] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1; mu_load = 1'b1; mu_in = 16'sd512;
    @(negedge clk);
    mu_load = 1'b0;
    while (!all_done()) begin
      for (int a = 0; a < 6; a++) begin
        bit     vv;
        int     ch;
        longint uu, dd;
        ch = 0;
        if (accepted[a] >= NS)      vv = 1'b0;
        else if (a < 4)             vv = (accepted[a] >= NS/2) || ($urandom_range(0, 3) != 0);
        else if (a == 4) begin
          vv = (accepted[a] < NS/2) ? (cycle[0] == 1'b0) : 1'b1;
          ch = (accepted[a] >= NS/2 && cycle[0]) ? 1 : 0;
        end else                    vv = (cycle[0] == 1'b0);
        if (a == 5 && accepted[a] >= NS) vv = 1'b0;
        uu = longint'($urandom_range(0, 4095)) - 2048;
        dd = vv ? plant(a, ch, TAPS[a], uu) : 0;
        in_valid[a] = vv; u_in[a] = sample_t'(uu); d_in[a] = sample_t'(dd);
        if (accepted[a] < NS) begin
          if (a < 4 && !vv) n_stall++;
          if (a == 4 && !vv) n_nil++;
          if (a == 4 && vv && ch == 1) n_dual++;
          if (a == 5 && !vv) n_inject++;
        end
        if (a < 4) begin
          if (vv) begin
            rm[a].push(uu, dd, 1'b1);
            exp_y[a].push_back(rm[a].y[items[a]]); exp_e[a].push_back(rm[a].e[items[a]]);
            exp_item[a].push_back(items[a]);
            items[a]++;
          end
        end else if (accepted[a] < NS) begin
          rm[a].push(uu, dd, vv);
          if (vv) begin
            exp_y[a].push_back(rm[a].y[items[a]]); exp_e[a].push_back(rm[a].e[items[a]]);
            exp_item[a].push_back(items[a]);
          end
          items[a]++;
        end
      end
      #1;
      for (int a = 0; a < 6; a++) begin
        check(out_valid[a] == (in_valid[a] && accepted[a] >= LATS[a]),
              $sformatf("array %0d out_valid", a));
        if (out_valid[a] && exp_y[a].size() > 0) begin
          longint ey, ee;
          ey = exp_y[a].pop_front(); ee = exp_e[a].pop_front(); last_item[a] = exp_item[a].pop_front();
          check(longint'(y_out[a]) == ey, $sformatf("array %0d y=%0d exp %0d", a, y_out[a], ey));
          check(longint'(e_out[a]) == ee, $sformatf("array %0d e=%0d exp %0d", a, e_out[a], ee));
          if (first_out[a] < 0) begin
            first_out[a] = accepted[a];
            if (accepted[a] > 0) n_latency++;
          end
          if (outputs[a] < NS/4)    err_early[a] += (ee < 0) ? -ee : ee;
          if (outputs[a] >= NS*3/4) err_late[a]  += (ee < 0) ? -ee : ee;
          outputs[a]++;
        end
        if (in_valid[a]) accepted[a]++;
      end
      @(posedge clk);
      @(negedge clk);
      cycle++;
    end
    for (int a = 0; a < 6; a++) in_valid[a] = 1'b0;
    #1;
    for (int a = 0; a < 6; a++) begin
      check(first_out[a] == LATS[a], $sformatf("array %0d latency %0d", a, first_out[a]));
      check(outputs[a] == NS - LATS[a], $sformatf("array %0d outputs %0d", a, outputs[a]));
      for (int i = 0; i < TAPS[a]; i++)
        check(longint'(w_of(a, i)) == rm[a].wsnap[last_item[a] + 1][i],
              $sformatf("array %0d w[%0d]=%0d exp %0d", a, i, w_of(a, i), rm[a].wsnap[last_item[a] + 1][i]));
      check(w_of(a, 0) != '0, $sformatf("array %0d never adapted", a));
      check(err_late[a] < err_early[a],
            $sformatf("array %0d error %0d -> %0d", a, err_early[a], err_late[a]));
      $display("array %0d: samples=%0d outputs=%0d |e| first quarter=%0d last quarter=%0d",
               a, accepted[a], outputs[a], err_early[a], err_late[a]);
    end
    $display("mechanisms: stalls=%0d latency_arrays=%0d nil_slots=%0d second_signal=%0d sum_injections=%0d",
             n_stall, n_latency, n_nil, n_dual, n_inject);
    check(n_stall > 0,   "no stall");
    check(n_latency == 2, "pipeline latency not seen on both unidirectional arrays");
    check(n_nil > 0,     "no nil slot");
    check(n_dual > 0,    "no second-signal sample");
    check(n_inject > 0,  "no partial-sum injection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
