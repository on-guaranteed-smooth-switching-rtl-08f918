// tb_xpb: self-checking testbench of the two-cell crosspoint buffer.
// Drives random push/pop patterns against a queue model: cut-through when
// empty, FIFO order, occupancy, ineffective pops, and the sticky overflow
// flag when a third cell is pushed without a pop.
module tb_xpb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic push, pop, pv, ineff, ovf;
  logic [15:0] pd, pdata;
  logic [1:0] occ;
  xpb #(.DEPTH(2), .W(16)) dut (.clk, .rst_n, .push, .push_data(pd), .pop,
    .pop_valid(pv), .pop_data(pdata), .ineff, .occ, .overflow(ovf));

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] q[$];
  bit model_ovf = 0;
  int n_ct = 0, n_full = 0, n_ineff = 0;
  initial begin
    push = 0; pop = 0; pd = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      push = $urandom_range(0, 1) == 1;
      pop  = (q.size() == 2 && c < 1500) ? 1'b1 : ($urandom_range(0, 2) == 0);
      pd   = 16'(c);
      #1;
      check(occ == 2'(q.size() + int'(push)), $sformatf("occ %0d vs %0d", occ, q.size()));
      if (push) q.push_back(pd);
      if (pop && q.size() != 0) begin
        check(pv && pdata == q[0], $sformatf("pop data %h want %h", pdata, q[0]));
        if (q.size() == 1 && push) n_ct++;
        void'(q.pop_front());
      end else if (pop) begin
        check(!pv && ineff, "ineffective pop");
        n_ineff++;
      end else begin
        check(!pv && !ineff, "no pop");
      end
      if (q.size() > 2) begin
        model_ovf = 1;
        void'(q.pop_back());
      end
      if (q.size() == 2) n_full++;
      @(posedge clk);
      #1 check(ovf == model_ovf, "overflow flag");
    end
    check(n_ct > 0 && n_full > 0 && n_ineff > 0 && model_ovf, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
