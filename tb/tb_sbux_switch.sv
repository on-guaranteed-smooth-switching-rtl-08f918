// tb_sbux_switch: self-checking testbench of the smoothed buffered crossbar.
//
// Part A (N = 3, T = 15, LAT = 2) replays a known worst case: row 3 of the
// matrix is (1,3,11)/15, column 2 is (2,10,3)/15, all VOQs backlogged. Flow
// 3->2 must leave output 2 in output slots 1 and 13 of the first period, the
// output scheduler's service to XPB(3,2) in slot 7 must be ineffective, and
// XPB(3,2) must hold two cells at the end of slot 12.
// Part B (N = 4, T = 32, LAT = 3) runs random traffic under a new random
// admissible matrix every period: every cell must leave at its destination,
// from the right input, in order and without loss, no crosspoint buffer may
// overflow (two cells always suffice, also across rate changes), and
// ineffective services on both sides and full buffers must all occur.
module tb_sbux_switch;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- part A ----------------
  localparam int NA = 3, TA = 15;
  logic [NA-1:0]                a_iv, a_ov, a_ineff_in, a_ineff_out, a_drop;
  logic [NA-1:0][1:0]           a_idst, a_osrc;
  logic [NA-1:0][15:0]          a_icell, a_ocell;
  logic [NA-1:0][NA-1:0][3:0]   a_rate, a_sirate;
  logic [NA-1:0][NA-1:0][4:0]   a_voq;
  logic [NA-1:0][NA-1:0][1:0]   a_xocc;
  logic                         a_sis, a_sil, a_ovf;
  logic [3:0]                   a_slot;
  sbux_switch #(.N(NA), .T(TA), .W(16), .VOQ_DEPTH(16), .XPB_DEPTH(2), .LAT(2)) ua (
    .clk, .rst_n, .in_valid(a_iv), .in_dst(a_idst), .in_cell(a_icell), .rate_next(a_rate),
    .out_valid(a_ov), .out_src(a_osrc), .out_cell(a_ocell), .si_start(a_sis), .si_load(a_sil),
    .si_rate(a_sirate), .slot(a_slot), .voq_occ(a_voq), .xpb_occ(a_xocc),
    .ineff_in(a_ineff_in), .ineff_out(a_ineff_out), .voq_drop(a_drop), .xpb_overflow(a_ovf));

  // ---------------- part B ----------------
  localparam int NB = 4, TB = 32;
  logic [NB-1:0]                b_iv, b_ov, b_ineff_in, b_ineff_out, b_drop;
  logic [NB-1:0][1:0]           b_idst, b_osrc;
  logic [NB-1:0][31:0]          b_icell, b_ocell;
  logic [NB-1:0][NB-1:0][5:0]   b_rate, b_sirate;
  logic [NB-1:0][NB-1:0][4:0]   b_voq;
  logic [NB-1:0][NB-1:0][1:0]   b_xocc;
  logic                         b_sis, b_sil, b_ovf;
  logic [4:0]                   b_slot;
  sbux_switch #(.N(NB), .T(TB), .W(32), .VOQ_DEPTH(16), .XPB_DEPTH(2), .LAT(3)) ub (
    .clk, .rst_n, .in_valid(b_iv), .in_dst(b_idst), .in_cell(b_icell), .rate_next(b_rate),
    .out_valid(b_ov), .out_src(b_osrc), .out_cell(b_ocell), .si_start(b_sis), .si_load(b_sil),
    .si_rate(b_sirate), .slot(b_slot), .voq_occ(b_voq), .xpb_occ(b_xocc),
    .ineff_in(b_ineff_in), .ineff_out(b_ineff_out), .voq_drop(b_drop), .xpb_overflow(b_ovf));

  int seq_in[NB][NB], exp_q[NB][NB][$];
  int n_out = 0, n_full_xpb = 0, n_ineff_o = 0, n_ineff_i = 0, n_drop = 0;

  // random admissible matrix: sum of K random permutations, K <= TB
  task automatic new_matrix();
    int perm[NB];
    int k;
    b_rate = '0;
    k = TB - int'($urandom_range(0, 4));
    for (int s = 0; s < k; s++) begin
      for (int i = 0; i < NB; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < NB; i++) b_rate[i][perm[i]] = b_rate[i][perm[i]] + 1'b1;
    end
  endtask

  initial begin
    int a_out_slots[$];
    bit seen_ineff7, seen_occ2;
    bit in_period;
    a_iv = '0; a_idst = '0; a_icell = '0; a_rate = '0;
    b_iv = '0; b_idst = '0; b_icell = '0; b_rate = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // ---- part A: preload 10 cells into every VOQ while all rates are 0
    for (int c = 0; c < 30; c++) begin
      @(negedge clk);
      for (int i = 0; i < NA; i++) begin
        a_iv[i]    = 1'b1;
        a_idst[i]  = 2'(c % 3);
        a_icell[i] = 16'({4'(i), 4'(c % 3), 8'(c / 3)});
      end
    end
    @(negedge clk);
    a_iv = '0;
    a_rate = {{4'd11, 4'd3, 4'd1}, {4'd2, 4'd10, 4'd3}, {4'd2, 4'd2, 4'd11}};
    // wait for the rates to reach the output side: output slot 0 of a period
    // in which the output schedulers run the new matrix
    while (!(a_sil)) @(negedge clk);
    while (!(a_slot == 4'd0)) @(negedge clk);
    seen_ineff7 = 0; seen_occ2 = 0;
    for (int t = 0; t < TA; t++) begin
      check(a_slot == 4'(t), "part A slot");
      if (a_ov[1] && a_osrc[1] == 2'd2) a_out_slots.push_back(t);
      if (t == 7) seen_ineff7 = a_ineff_out[1] && ua.so_gi[1] == 2'd2;
      if (t == 12) seen_occ2 = (a_xocc[2][1] == 2'd2) && !(ua.so_gv[1] && ua.so_gi[1] == 2'd2);
      check(!(a_ineff_out[1] && ua.so_gi[1] == 2'd2) || t == 7, $sformatf("unexpected ineffective op slot %0d", t));
      @(negedge clk);
    end
    check(a_out_slots.size() == 2, $sformatf("flow 3->2 got %0d cells", a_out_slots.size()));
    if (a_out_slots.size() == 2) begin
      check(a_out_slots[0] == 1, $sformatf("first cell slot %0d", a_out_slots[0]));
      check(a_out_slots[1] == 13, $sformatf("second cell slot %0d", a_out_slots[1]));
    end
    check(seen_ineff7, "ineffective output operation in slot 7");
    check(seen_occ2, "XPB(3,2) holds two cells at end of slot 12");
    check(!a_ovf, "part A no overflow");

    // ---- part B
    for (int i = 0; i < NB; i++) for (int j = 0; j < NB; j++) seq_in[i][j] = 0;
    new_matrix();
    for (int c = 0; c < TB * 300; c++) begin
      @(negedge clk);
      if (b_sil) new_matrix();
      for (int i = 0; i < NB; i++) begin
        int d;
        d = int'($urandom_range(0, NB - 1));
        b_iv[i]    = (c < TB * 280) && ($urandom_range(0, 9) < ((c / 1000) % 2 ? 10 : 7));
        b_idst[i]  = 2'(d);
        b_icell[i] = {8'(i), 8'(d), 16'(seq_in[i][d])};
      end
      #1;
      for (int i = 0; i < NB; i++) begin
        if (b_iv[i] && !b_drop[i]) begin
          exp_q[i][b_idst[i]].push_back(seq_in[i][b_idst[i]]);
          seq_in[i][b_idst[i]]++;
        end
        if (b_drop[i]) n_drop++;
        if (b_ineff_in[i]) n_ineff_i++;
      end
      for (int j = 0; j < NB; j++) begin
        if (b_ineff_out[j]) n_ineff_o++;
        if (b_ov[j]) begin
          int s, d, q;
          s = int'(b_ocell[j][31:24]); d = int'(b_ocell[j][23:16]); q = int'(b_ocell[j][15:0]);
          n_out++;
          check(s == int'(b_osrc[j]) && d == j, $sformatf("cell routing out %0d src %0d dst %0d", j, s, d));
          if (exp_q[s][d].size() == 0) check(0, "cell out of nowhere");
          else begin
            check(q == exp_q[s][d][0], $sformatf("order flow %0d->%0d seq %0d want %0d", s, d, q, exp_q[s][d][0]));
            void'(exp_q[s][d].pop_front());
          end
        end
        for (int i = 0; i < NB; i++)
          if (b_xocc[i][j] == 2'd2 && !(ub.so_gv[j] && ub.so_gi[j] == 2'(i))) n_full_xpb++;
      end
      check(!b_ovf, "no crosspoint overflow");
    end
    // nothing may be lost beyond what is still queued
    begin
      int left;
      left = 0;
      for (int i = 0; i < NB; i++) for (int j = 0; j < NB; j++) left += exp_q[i][j].size();
      // at most a full VOQ, the link and a crosspoint buffer per flow remain
      check(left <= NB * NB * (16 + 2) + NB * 3, $sformatf("cells in flight %0d", left));
    end
    check(n_out > TB * 200, $sformatf("throughput %0d cells", n_out));
    check(n_full_xpb > 0 && n_ineff_o > 0 && n_ineff_i > 0, "events seen");
    $display("part B: %0d cells out, %0d drops, xpb at 2 cells %0d times, ineffective in/out %0d/%0d",
             n_out, n_drop, n_full_xpb, n_ineff_i, n_ineff_o);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
