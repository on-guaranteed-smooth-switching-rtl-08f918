// tb_sbux_top: end-to-end testbench of the switch with its regulator.
//
// Reduced size: N = 4, T = 32, LAT = 2, 32-bit cells, 32-cell VOQs.
// Phase 1 (real-time): a fixed admissible matrix from admission control and
// conforming traffic. Phase 2 (best-effort): the regulator supplies the
// matrix; traffic changes pattern every few periods (uniform, diagonal,
// hot-spot). Phase 3 returns to real-time, then best-effort again.
// Checked throughout: every cell accepted into a VOQ leaves at its
// destination from the right input, in order, without loss (a VOQ may drop
// an arrival only when full); no crosspoint buffer overflows; each
// regulator result equals a reference scaler+booster computed from the
// published demand matrix, is admissible, and is the matrix in force after
// the next rate update; in real-time mode the matrix in force is rt_rate.
// Counted, and required to happen: rate updates, regulator runs, booster
// adding bandwidth, mode switches, ineffective input and output services,
// crosspoint buffers holding two cells.
module tb_sbux_top;
  localparam int N = 4, T = 32, W = 32, VD = 32, LAT = 2;
  localparam int RW = $clog2(T + 1), IW = $clog2(N), L = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic                         best_effort;
  logic [N-1:0][N-1:0][RW-1:0]  rt_rate, cur_rate;
  logic [N-1:0][N-1:0][L-1:0]   demand;
  logic [N-1:0]                 in_valid, out_valid, ineff_in, ineff_out, voq_drop;
  logic [N-1:0][IW-1:0]         in_dst, out_src;
  logic [N-1:0][W-1:0]          in_cell, out_cell;
  logic                         rate_update, period_start, alloc_done, xpb_overflow;
  logic [$clog2(T)-1:0]         slot;
  logic [N-1:0][N-1:0][$clog2(VD+1)-1:0] voq_occ;
  logic [N-1:0][N-1:0][1:0]     xpb_occ;

  sbux_top #(.N(N), .T(T), .W(W), .VOQ_DEPTH(VD), .LAT(LAT)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef int mat_t[N][N];
  function automatic void ref_alloc(input mat_t d, input int first, output mat_t a, output bit boosted);
    int rs[N], cs[N];
    boosted = 0;
    for (int i = 0; i < N; i++) begin rs[i] = 0; cs[i] = 0; end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin rs[i] += d[i][j]; cs[j] += d[i][j]; end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      int mx;
      mx = rs[i] > cs[j] ? rs[i] : cs[j];
      a[i][j] = (mx == 0) ? 0 : (d[i][j] * T) / mx;
    end
    for (int i = 0; i < N; i++) begin rs[i] = 0; cs[i] = 0; end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin rs[i] += a[i][j]; cs[j] += a[i][j]; end
    for (int s = 0; s < N; s++)
      for (int i = 0; i < N; i++) begin
        int j, mx, dl;
        j = (i + (first + s) % N) % N;
        mx = rs[i] > cs[j] ? rs[i] : cs[j];
        dl = (mx >= T) ? 0 : T - mx;
        if (dl > 0) boosted = 1;
        a[i][j] += dl; rs[i] += dl; cs[j] += dl;
      end
  endfunction

  int seq_in[N][N], exp_q[N][N][$];
  int n_drop = 0, n_upd = 0, n_alloc = 0, n_boost = 0, n_mode = 0, n_ii = 0, n_io = 0, n_x2 = 0, n_out = 0, n_arr = 0;
  mat_t pend;  bit pend_v = 0;

  // monitor: runs every slot
  always @(negedge clk) if (rst_n) begin
    #1;
    for (int i = 0; i < N; i++) begin
      if (in_valid[i]) begin
        if (voq_drop[i]) begin
          n_drop++;
          check(int'(voq_occ[i][in_dst[i]]) == VD, "a VOQ drops only when full");
        end else begin
          exp_q[i][in_dst[i]].push_back(seq_in[i][in_dst[i]]);
          seq_in[i][in_dst[i]]++;
          n_arr++;
        end
      end
      if (ineff_in[i]) n_ii++;
    end
    for (int j = 0; j < N; j++) begin
      if (ineff_out[j]) n_io++;
      for (int i = 0; i < N; i++)
        if (xpb_occ[i][j] == 2'd2 && !(dut.u_sw.so_gv[j] && dut.u_sw.so_gi[j] == IW'(i))) n_x2++;
      if (out_valid[j]) begin
        int s, d, q;
        s = int'(out_cell[j][31:24]); d = int'(out_cell[j][23:16]); q = int'(out_cell[j][15:0]);
        n_out++;
        check(s == int'(out_src[j]) && d == j, "routing");
        if (exp_q[s][d].size() == 0) check(0, "unexpected cell");
        else begin
          check(q == exp_q[s][d][0], $sformatf("order %0d->%0d", s, d));
          void'(exp_q[s][d].pop_front());
        end
      end
    end
    check(!xpb_overflow, "no crosspoint overflow");
    if (alloc_done) begin
      mat_t d, a;
      bit b;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) d[i][j] = int'(demand[i][j]);
      ref_alloc(d, n_alloc % N, a, b);
      for (int i = 0; i < N; i++) begin
        int rsum, csum;
        rsum = 0; csum = 0;
        for (int j = 0; j < N; j++) begin
          check(int'(dut.alloc[i][j]) == a[i][j], "allocation matches reference");
          rsum += int'(dut.alloc[i][j]); csum += int'(dut.alloc[j][i]);
        end
        check(rsum <= T && csum <= T, "allocation admissible");
      end
      if (b) n_boost++;
      n_alloc++;
      pend = a; pend_v = 1;
    end
    if (rate_update) begin
      n_upd++;
      // takes effect at the following edge; compare one cycle later
      fork begin
        @(negedge clk); #1;
        for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
          if (best_effort && pend_v) check(int'(cur_rate[i][j]) == pend[i][j], "regulator matrix in force");
          else if (!best_effort) check(cur_rate[i][j] == rt_rate[i][j], "admission matrix in force");
      end join_none
    end
  end

  // traffic: pattern 0 uniform, 1 diagonal-heavy, 2 hot-spot on output 0
  task automatic drive(int slots, int pattern, int load_pct);
    for (int c = 0; c < slots; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        int d;
        case (pattern)
          1: d = ($urandom_range(0, 3) != 0) ? i : int'($urandom_range(0, N - 1));
          2: d = ($urandom_range(0, 4 * N - 1) < 3) ? 0 : int'($urandom_range(0, N - 1));
          default: d = int'($urandom_range(0, N - 1));
        endcase
        in_valid[i] = int'($urandom_range(0, 99)) < load_pct;
        in_dst[i]   = IW'(d);
        in_cell[i]  = {8'(i), 8'(d), 16'(seq_in[i][d])};
      end
    end
    @(negedge clk);
    in_valid = '0;
  endtask

  initial begin
    best_effort = 0; in_valid = '0; in_dst = '0; in_cell = '0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      seq_in[i][j] = 0;
      rt_rate[i][j] = RW'(T / N);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // phase 1: real-time, uniform conforming load
    drive(T * 10, 0, 60);
    // phase 2: best-effort, changing patterns
    @(negedge clk); best_effort = 1; n_mode++;
    for (int ph = 0; ph < 9; ph++) drive(T * 6, ph % 3, (ph % 3 == 2) ? 50 : 55);
    // phase 3: real-time with a diagonal matrix, then best-effort again
    @(negedge clk); best_effort = 0; n_mode++;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) rt_rate[i][j] = RW'((i == j) ? T / 2 : T / (2 * (N - 1)));
    drive(T * 8, 1, 40);
    @(negedge clk); best_effort = 1; n_mode++;
    drive(T * 8, 0, 70);
    // drain
    repeat (T * 20) @(negedge clk);
    begin
      int left;
      left = 0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) left += exp_q[i][j].size();
      check(left == 0, $sformatf("all cells delivered, %0d left", left));
    end
    check(n_upd > 0,   "rate updates happened");
    check(n_alloc > 0, "regulator ran");
    check(n_boost > 0, "booster added bandwidth");
    check(n_mode == 3, "mode switches");
    check(n_ii > 0,    "ineffective input services");
    check(n_io > 0,    "ineffective output services");
    check(n_x2 > 0,    "crosspoint buffer held two cells");
    $display("dropped at full VOQs %0d", n_drop);
    $display("arrived %0d delivered %0d; updates %0d, regulator runs %0d (boosted %0d), mode switches %0d",
             n_arr, n_out, n_upd, n_alloc, n_boost, n_mode);
    $display("ineffective in/out %0d/%0d, xpb at two cells %0d", n_ii, n_io, n_x2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
