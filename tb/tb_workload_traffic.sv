// tb_workload_traffic: best-effort workloads on the default-size switch
// (N = 32, T = 256), with the regulator supplying the rates.
//
// 1. Synthetic traffic: phases of random length in [100, 2000] slots, each a
//    random mix phi1*U + phi2*LD + phi3*UB(0.5) of the uniform, log-diagonal
//    (destination i+k with weight 2^-k) and unbalanced (w = 0.5) patterns, at
//    load 0.8.
// 2. Bursty traffic: on-off sources (two-state Markov chain), mean burst 16
//    cells to one destination, load 0.8.
// Each cell carries its arrival slot. Measured: throughput (cells delivered /
// cells accepted), mean delay, and mean output burst length (run of
// consecutive cells at an output from the same input). Checked: no loss or
// reordering, no crosspoint overflow, everything drained at the end,
// throughput >= 0.99 counting VOQ drops as losses, mean output burst <= 1.2.
// The drain lasts more than N*T slots: a cell left in a crosspoint buffer
// after its VOQ has emptied has no demand behind it, so it leaves only when
// the booster's rotating diagonal reaches its pair (once every N periods).
module tb_workload_traffic;
  localparam int N = 32, T = 256, W = 512, VD = 256;
  localparam int RW = $clog2(T + 1), IW = $clog2(N), L = 16;
  localparam int SYN_SLOTS = 24000, BUR_SLOTS = 12000, DRAIN = 12000;

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

  sbux_top dut (.*);

  initial begin
    repeat (SYN_SLOTS + BUR_SLOTS + DRAIN + 2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int now = 0;
  int seq_in[N][N], exp_q[N][N][$];
  longint tot_delay = 0;
  int n_acc = 0, n_drop = 0, n_out = 0, n_seg = 0;
  int last_src[N];

  always @(posedge clk) now <= now + 1;

  always @(negedge clk) if (rst_n) begin
    #1;
    for (int i = 0; i < N; i++)
      if (in_valid[i]) begin
        if (voq_drop[i]) n_drop++;
        else begin
          exp_q[i][in_dst[i]].push_back(seq_in[i][in_dst[i]]);
          seq_in[i][in_dst[i]]++;
          n_acc++;
        end
      end
    for (int j = 0; j < N; j++)
      if (out_valid[j]) begin
        int s, d, q, ts;
        s  = int'(out_cell[j][31:24]); d = int'(out_cell[j][23:16]);
        q  = int'(out_cell[j][15:0]);  ts = int'(out_cell[j][63:32]);
        n_out++;
        tot_delay += longint'(now - ts);
        if (last_src[j] != s) n_seg++;
        last_src[j] = s;
        check(s == int'(out_src[j]) && d == j, "routing");
        if (exp_q[s][d].size() == 0) check(0, "unexpected cell");
        else begin
          check(q == exp_q[s][d][0], "order");
          void'(exp_q[s][d].pop_front());
        end
      end
    check(!xpb_overflow, "no crosspoint overflow");
  end

  function automatic int pick_dst(int i, int phi_u, int phi_ld);
    int r, k;
    r = int'($urandom_range(0, 99));
    if (r < phi_u) return int'($urandom_range(0, N - 1));
    if (r < phi_u + phi_ld) begin
      // log-diagonal: offset k with probability proportional to 2^-k
      do begin
        k = 0;
        while (k < N && $urandom_range(0, 1) == 0) k++;
      end while (k >= N);
      return (i + k) % N;
    end
    // unbalanced, w = 0.5: own output with 0.5 + 0.5/N, else uniform
    if ($urandom_range(0, 1) == 0) return i;
    return int'($urandom_range(0, N - 1));
  endfunction

  task automatic put(int i, int d);
    in_valid[i] = 1'b1;
    in_dst[i]   = IW'(d);
    in_cell[i]  = '0;
    in_cell[i][63:0] = {32'(now), 8'(i), 8'(d), 16'(seq_in[i][d])};
  endtask

  initial begin
    int phase_left, phi_u, phi_ld, n_phase;
    bit on[N];
    int bdst[N];
    real thr, dly, burst;
    best_effort = 1; in_valid = '0; in_dst = '0; in_cell = '0; rt_rate = '0;
    for (int i = 0; i < N; i++) begin
      last_src[i] = -1; on[i] = 0; bdst[i] = 0;
      for (int j = 0; j < N; j++) seq_in[i][j] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // synthetic phases
    phase_left = 0; n_phase = 0; phi_u = 0; phi_ld = 0;
    for (int c = 0; c < SYN_SLOTS; c++) begin
      @(negedge clk);
      if (phase_left == 0) begin
        int a, b;
        phase_left = int'($urandom_range(100, 2000));
        a = int'($urandom_range(0, 100)); b = int'($urandom_range(0, 100));
        phi_u  = (a < b) ? a : b;
        phi_ld = ((a < b) ? b : a) - phi_u;
        n_phase++;
      end
      phase_left--;
      for (int i = 0; i < N; i++) begin
        in_valid[i] = 1'b0;
        if ($urandom_range(0, 99) < 80) put(i, pick_dst(i, phi_u, phi_ld));
      end
    end
    // bursty on-off: mean burst 16, mean gap 4 (load 0.8)
    for (int c = 0; c < BUR_SLOTS; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        in_valid[i] = 1'b0;
        if (!on[i] && $urandom_range(0, 3) == 0) begin
          on[i] = 1; bdst[i] = int'($urandom_range(0, N - 1));
        end
        if (on[i]) begin
          put(i, bdst[i]);
          if ($urandom_range(0, 15) == 0) on[i] = 0;
        end
      end
    end
    @(negedge clk);
    in_valid = '0;
    repeat (DRAIN) @(negedge clk);
    begin
      int left;
      left = 0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) left += exp_q[i][j].size();
      check(left == 0, $sformatf("drained, %0d left", left));
    end
    thr   = real'(n_out) / real'(n_acc + n_drop);
    dly   = real'(tot_delay) / real'(n_out);
    burst = real'(n_out) / real'(n_seg);
    $display("synthetic phases %0d; cells offered %0d, dropped %0d, delivered %0d",
             n_phase, n_acc + n_drop, n_drop, n_out);
    $display("throughput %0.4f, mean delay %0.1f slots, mean output burst %0.3f", thr, dly, burst);
    check(n_phase > 5, "several synthetic phases");
    check(thr >= 0.99, "throughput at least 0.99");
    check(burst <= 1.2, "output bursts broken up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
