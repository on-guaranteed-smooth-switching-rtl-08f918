// tb_voq_bank: random arrivals and random services on a 4-queue bank of
// depth 4, compared with per-queue FIFO models: served cells, ineffective
// services, backlog counts and drops of arrivals to full queues.
module tb_voq_bank;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic iv, sv, ov, drop; logic [1:0] idst, sidx; logic [15:0] icell, ocell;
  logic [3:0][2:0] occ;
  voq_bank #(.N(4), .DEPTH(4), .W(16)) dut (.clk, .rst_n, .in_valid(iv), .in_dst(idst),
    .in_cell(icell), .serve(sv), .serve_idx(sidx), .out_valid(ov), .out_cell(ocell),
    .occ, .drop);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] q[4][$];
  int n_drop = 0, n_ineff = 0, n_serve = 0;
  initial begin
    iv = 0; sv = 0; idst = 0; sidx = 0; icell = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      iv    = $urandom_range(0, 3) != 0;
      idst  = 2'($urandom_range(0, (c < 1000) ? 1 : 3));
      icell = 16'(c);
      sv    = $urandom_range(0, 2) != 0;
      sidx  = 2'($urandom);
      #1;
      for (int k = 0; k < 4; k++) check(occ[k] == 3'(q[k].size()), $sformatf("occ %0d", k));
      if (sv && q[sidx].size() > 0) begin
        check(ov && ocell == q[sidx][0], "served head cell");
        void'(q[sidx].pop_front());
        n_serve++;
      end else if (sv) begin
        check(!ov, "ineffective service");
        n_ineff++;
      end else check(!ov, "no service");
      if (iv && q[idst].size() < 4) begin
        check(!drop, "no drop");
        q[idst].push_back(icell);
      end else if (iv) begin
        check(drop, "drop when full");
        n_drop++;
      end
    end
    check(n_drop > 0 && n_ineff > 0 && n_serve > 0, "cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
