// tb_smux: self-checking testbench of the sMUX scheduler.
//
// 1. Rates (5/8, 2/8): the slot sequence must be f0 f1 f0 idle f0 f0 f1 f0.
// 2. Rates (1,3,11)/15 and (2,10,3)/15 (an input row and an output column of
//    a 3x3 switch) against their known schedules.
// 3. Random admissible rates for 8 flows, T = 64, over several periods with a
//    rate change every period, compared slot by slot with a reference model
//    that evaluates ceil((j-1)T/a) and ceil(jT/a) directly; every flow must
//    receive exactly a services per period, each inside its window.
module tb_smux;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- DUT A: N=2, T=8
  logic la; logic [1:0][3:0] ra; logic gva; logic ga; logic [3:0] sa;
  smux #(.N(2), .T(8)) ua (.clk, .rst_n, .load(la), .rate_in(ra),
                            .grant_valid(gva), .grant_idx(ga), .slot(sa));
  // ---- DUT B, C: N=3, T=15
  logic lb; logic [2:0][3:0] rb, rc; logic gvb, gvc; logic [1:0] gb, gc; logic [3:0] sb, sc;
  smux #(.N(3), .T(15)) ub (.clk, .rst_n, .load(lb), .rate_in(rb),
                             .grant_valid(gvb), .grant_idx(gb), .slot(sb));
  smux #(.N(3), .T(15)) uc (.clk, .rst_n, .load(lb), .rate_in(rc),
                             .grant_valid(gvc), .grant_idx(gc), .slot(sc));
  // ---- DUT D: N=8, T=64
  logic ld; logic [7:0][6:0] rd; logic gvd; logic [2:0] gd; logic [6:0] sd;
  smux #(.N(8), .T(64)) ud (.clk, .rst_n, .load(ld), .rate_in(rd),
                             .grant_valid(gvd), .grant_idx(gd), .slot(sd));

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference EDF over one period; -1 = idle
  function automatic void ref_sched(input int n, input int t_per, input int rates[],
                                    output int sched[]);
    int done[];
    done = new[n];
    sched = new[t_per];
    for (int t = 0; t < t_per; t++) begin
      int best = -1, bd = 0;
      for (int i = 0; i < n; i++) begin
        if (rates[i] == 0 || done[i] >= rates[i]) continue;
        if ((done[i] * t_per + rates[i] - 1) / rates[i] <= t) begin
          int d = ((done[i] + 1) * t_per + rates[i] - 1) / rates[i];
          if (best < 0 || d < bd) begin best = i; bd = d; end
        end
      end
      sched[t] = best;
      if (best >= 0) done[best]++;
    end
  endfunction

  int expa[8]  = '{0, 1, 0, -1, 0, 0, 1, 0};
  int expb[15] = '{2, 1, 2, 2, 0, 2, 2, 2, 1, 2, 2, 2, 1, 2, 2};
  int expc[15] = '{1, 2, 1, 1, 0, 1, 1, 2, 1, 1, 0, 1, 1, 2, 1};

  initial begin
    la = 0; lb = 0; ld = 0; ra = '0; rb = '0; rc = '0; rd = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!gva && !gvb && !gvd, "no grant before first load");
    // load
    ra <= {4'd2, 4'd5};
    rb <= {4'd11, 4'd3, 4'd1};
    rc <= {4'd3, 4'd10, 4'd2};
    la <= 1; lb <= 1;
    @(posedge clk);
    la <= 0; lb <= 0;
    for (int t = 0; t < 15; t++) begin
      @(negedge clk);
      if (t < 8) begin
        check(sa == 4'(t), "slot counter A");
        check(expa[t] < 0 ? !gva : (gva && ga == 1'(expa[t])),
              $sformatf("A slot %0d got %0d/%0d", t, gva, ga));
      end
      check(gvb && gb == 2'(expb[t]), $sformatf("B slot %0d got %0d", t, gb));
      check(gvc && gc == 2'(expc[t]), $sformatf("C slot %0d got %0d", t, gc));
      @(posedge clk);
    end

    // random periods on DUT D
    for (int p = 0; p < 12; p++) begin
      int rates[], sched[], cnt[8], first[8], left;
      rates = new[8];
      left = 64 - int'($urandom_range(0, 6));
      for (int i = 0; i < 8; i++) begin
        rates[i] = (i == 7) ? left : int'($urandom_range(0, left));
        if (p % 3 == 0 && i == 2) rates[i] = 0;
        if (rates[i] > left) rates[i] = left;
        left -= rates[i];
      end
      for (int i = 0; i < 8; i++) rd[i] <= 7'(rates[i]);
      ref_sched(8, 64, rates, sched);
      ld <= 1;
      @(posedge clk);
      ld <= 0;
      for (int i = 0; i < 8; i++) cnt[i] = 0;
      for (int t = 0; t < 64; t++) begin
        @(negedge clk);
        check(sched[t] < 0 ? !gvd : (gvd && int'(gd) == sched[t]),
              $sformatf("D period %0d slot %0d got %0d/%0d want %0d", p, t, gvd, gd, sched[t]));
        if (gvd) begin
          int e, d, j;
          j = cnt[gd] + 1;
          e = ((j - 1) * 64 + rates[gd] - 1) / rates[gd];
          d = (j * 64 + rates[gd] - 1) / rates[gd];
          check(t >= e && t < d, $sformatf("window of flow %0d service %0d", gd, j));
          cnt[gd]++;
        end
        if (t < 63) @(posedge clk);
      end
      for (int i = 0; i < 8; i++)
        check(cnt[i] == rates[i], $sformatf("flow %0d got %0d of %0d", i, cnt[i], rates[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
