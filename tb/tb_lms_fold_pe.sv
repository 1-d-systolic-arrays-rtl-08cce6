// tb_lms_fold_pe: self-checking testbench for the two-coefficient cell of the
// folded array (HV = 1, HT = 2).
//
// Random tagged items are driven on both lines. Checked every clock against a
// 64-bit integer model: a sample on the rightward line passes unchanged and
// the leftward sum gains v*p; otherwise the leftward item passes and the
// rightward sum gains t*r. After each clock v and t are checked against their
// LMS updates, v using the sample it multiplied one clock earlier and t the
// one it multiplied two clocks earlier.
module tb_lms_fold_pe;
  import lms_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0, mu_load = 1'b0, e_valid = 1'b0;
  mu_t     mu_in = '0;
  item_t   p_in = '0, r_in = '0;
  item_t   p_out, r_out;
  acc_t    e = '0;
  weight_t v, t;

  lms_fold_pe #(.HV(1), .HT(2)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sx(longint val, int bits);
    val = val & ((longint'(1) <<< bits) - 1);
    if (val[bits-1]) val = val - (longint'(1) <<< bits);
    return val;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic longint corr(longint mu, longint u, longint err);
    longint q;
    q = sx((mu * u) >>> 15, 16);
    return sx((q * err) >>> 4, 24);
  endfunction

  longint vm = 0, tm = 0, mu_m = 5000;
  longint hv [$], ht [$];
  int n_vop = 0, n_top = 0;

  initial begin : stimulus
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1; mu_load = 1'b1; mu_in = mu_t'(mu_m);
    @(negedge clk);
    mu_load = 1'b0;
    hv = '{0}; ht = '{0, 0};
    for (int c = 0; c < 1000; c++) begin
      bit     pu;
      longint ps, rs, ee, smp, vop, top;
      pu = $urandom_range(0, 1);
      smp = longint'($urandom_range(0, 16383)) - 8192;
      ps  = pu ? smp : longint'($urandom_range(0, 65535)) - 32768;
      rs  = pu ? longint'($urandom_range(0, 65535)) - 32768 : smp;
      ee  = longint'($urandom_range(0, 8191)) - 4096;
      e_valid = ($urandom_range(0, 3) != 0);
      p_in = '{is_u: pu, val: acc_t'(ps)};
      r_in = '{is_u: !pu, val: acc_t'(rs)};
      e = acc_t'(ee);
      #1;
      if (pu) begin
        check(p_out == p_in, "sample did not pass");
        check(longint'(r_out.val) == sx(rs + ((vm * ps) >>> 20), 24) && r_out.is_u == 1'b0,
              $sformatf("c=%0d r_out=%0d", c, r_out.val));
        vop = ps; top = 0; n_vop++;
      end else begin
        check(r_out == r_in, "sample did not pass back");
        check(longint'(p_out.val) == sx(ps + ((tm * rs) >>> 20), 24) && p_out.is_u == 1'b0,
              $sformatf("c=%0d p_out=%0d", c, p_out.val));
        vop = 0; top = rs; n_top++;
      end
      if (e_valid) begin
        vm = sx(vm + corr(mu_m, hv[0], ee), 24);
        tm = sx(tm + corr(mu_m, ht[1], ee), 24);
      end
      hv.push_front(vop); void'(hv.pop_back());
      ht.push_front(top); void'(ht.pop_back());
      @(posedge clk);
      #1;
      check(longint'(v) == vm, $sformatf("c=%0d v=%0d exp %0d", c, v, vm));
      check(longint'(t) == tm, $sformatf("c=%0d t=%0d exp %0d", c, t, tm));
      @(negedge clk);
    end
    check(n_vop > 0 && n_top > 0 && vm != 0 && tm != 0, "both options exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
