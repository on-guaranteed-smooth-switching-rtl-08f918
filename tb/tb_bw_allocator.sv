// tb_bw_allocator: self-checking testbench of the bandwidth allocator.
//
// 1. The 3x3 example with T = 10: demand [[4,5,6],[3,5,5],[2,1,6]] must scale
//    to [[2,3,3],[2,3,2],[2,0,3]] and boost to [[4,3,3],[2,6,2],[4,1,5]];
//    `done` must come 3N + ceil(N*N/M) + 1 cycles after `start`.
// 2. The same demand again: the booster now starts at diagonal 1 (round
//    robin), compared with a reference model.
// 3. Random 8x8 demands with T = 256 and M = 100 against the reference model;
//    every row and column sum of the result must be at most T.
module tb_bw_allocator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // small instance
  logic sa, ba, da;
  logic [2:0][2:0][15:0] dema;
  logic [2:0][2:0][3:0]  ala;
  bw_allocator #(.N(3), .T(10), .L(16), .M(4)) ua (.clk, .rst_n, .start(sa),
    .demand(dema), .alloc(ala), .busy(ba), .done(da));
  // larger instance
  logic sb, bb, db;
  logic [7:0][7:0][15:0] demb;
  logic [7:0][7:0][8:0]  alb;
  bw_allocator #(.N(8), .T(256), .L(16), .M(100)) ub (.clk, .rst_n, .start(sb),
    .demand(demb), .alloc(alb), .busy(bb), .done(db));

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef int mat_t[8][8];

  function automatic void ref_alloc(input int n, input int t, input mat_t d, input int first,
                                    output mat_t a);
    int rs[8], cs[8];
    for (int i = 0; i < 8; i++) begin
      rs[i] = 0; cs[i] = 0;
      for (int j = 0; j < 8; j++) a[i][j] = 0;
    end
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) begin
      rs[i] += d[i][j]; cs[j] += d[i][j];
    end
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) begin
      int mx = rs[i] > cs[j] ? rs[i] : cs[j];
      a[i][j] = (mx == 0) ? 0 : (d[i][j] * t) / mx;
    end
    for (int i = 0; i < n; i++) begin rs[i] = 0; cs[i] = 0; end
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) begin
      rs[i] += a[i][j]; cs[j] += a[i][j];
    end
    for (int s = 0; s < n; s++) begin
      int k = (first + s) % n;
      for (int i = 0; i < n; i++) begin
        int j = (i + k) % n;
        int mx = rs[i] > cs[j] ? rs[i] : cs[j];
        int dl = (mx >= t) ? 0 : t - mx;
        a[i][j] += dl; rs[i] += dl; cs[j] += dl;
      end
    end
  endfunction

  int fig_d[3][3]  = '{'{4, 5, 6}, '{3, 5, 5}, '{2, 1, 6}};
  int fig_s[3][3]  = '{'{2, 3, 3}, '{2, 3, 2}, '{2, 0, 3}};
  int fig_a[3][3]  = '{'{4, 3, 3}, '{2, 6, 2}, '{4, 1, 5}};

  initial begin
    mat_t d3, r3, d8, r8;
    int lat;
    sa = 0; sb = 0; dema = '0; demb = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin d3[i][j] = fig_d[i][j]; dema[i][j] <= 16'(fig_d[i][j]); end
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      sa = 1;
      @(negedge clk);
      sa = 0;
      lat = 1;
      while (!da) begin
        // scaled matrix is complete when the allocation sums start
        if (run == 0 && ua.state == 3'd3 && ua.cnt == 0)
          for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
            check(int'(ala[i][j]) == fig_s[i][j], $sformatf("scaled (%0d,%0d)=%0d", i, j, ala[i][j]));
        @(negedge clk);
        lat++;
      end
      check(lat == 3 * 3 + 3 + 1, $sformatf("latency %0d", lat));
      ref_alloc(3, 10, d3, run, r3);
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
        check(int'(ala[i][j]) == r3[i][j], $sformatf("run %0d alloc (%0d,%0d)=%0d want %0d", run, i, j, ala[i][j], r3[i][j]));
        if (run == 0) check(int'(ala[i][j]) == fig_a[i][j], "boosted example matrix");
      end
    end

    // random 8x8
    for (int run = 0; run < 10; run++) begin
      for (int i = 0; i < 8; i++) begin
        for (int j = 0; j < 8; j++) begin
          d8[i][j] = ($urandom_range(0, 3) == 0) ? 0 : int'($urandom_range(0, (run % 2) ? 3000 : 60));
          demb[i][j] = 16'(d8[i][j]);
        end
      end
      @(negedge clk);
      sb = 1;
      @(negedge clk);
      sb = 0;
      lat = 1;
      while (!db) begin @(negedge clk); lat++; end
      check(lat == 3 * 8 + 1 + 1, $sformatf("latency 8x8 %0d", lat));
      ref_alloc(8, 256, d8, run % 8, r8);
      for (int i = 0; i < 8; i++) begin
        int rsum, csum;
        rsum = 0; csum = 0;
        for (int j = 0; j < 8; j++) begin
          check(int'(alb[i][j]) == r8[i][j], $sformatf("8x8 run %0d (%0d,%0d)", run, i, j));
          rsum += int'(alb[i][j]); csum += int'(alb[j][i]);
        end
        check(rsum <= 256 && csum <= 256, "admissible");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
