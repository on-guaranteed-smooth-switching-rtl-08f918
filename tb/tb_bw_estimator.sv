// tb_bw_estimator: random arrivals, backlogs and allocations over many
// periods (N = 4, T = 16, L = 6 so that saturation is reached), compared
// with a model of p(k+1) = (f(k-1) + p(k))/2, q(k+1) = max(0, q(k) + p(k) -
// a(k)), d(k+1) = p(k+1) + q(k+1). The demand must appear one cycle after
// the sample slot.
module tb_bw_estimator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic arr, smp, dv;
  logic [1:0] adst;
  logic [3:0][5:0] occ;
  logic [3:0][4:0] alc;
  logic [3:0][5:0] dem;
  bw_estimator #(.N(4), .T(16), .L(6), .QW(6)) dut (.clk, .rst_n, .arrive(arr),
    .arrive_dst(adst), .sample(smp), .occ, .alloc(alc), .demand(dem), .demand_valid(dv));

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int f[4], p[4], want[4];
  int n_sat = 0, n_qzero = 0;
  initial begin
    arr = 0; smp = 0; adst = 0; occ = '0; alc = '0;
    for (int k = 0; k < 4; k++) begin f[k] = 0; p[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 16 * 60; c++) begin
      @(negedge clk);
      smp  = (c % 16) == 0;
      arr  = $urandom_range(0, 4) != 0;
      adst = 2'($urandom_range(0, (c / 160) % 2 ? 3 : 1));
      if (smp) begin
        for (int k = 0; k < 4; k++) begin
          int q;
          occ[k] = 6'($urandom_range(0, (c / 16) % 3 == 0 ? 63 : 8));
          alc[k] = 5'($urandom_range(0, 16));
          q = int'(occ[k]) + p[k] - int'(alc[k]);
          if (q < 0) begin q = 0; n_qzero++; end
          p[k] = (f[k] + p[k]) / 2;
          want[k] = p[k] + q;
          if (want[k] > 63) begin want[k] = 63; n_sat++; end
          f[k] = 0;
        end
      end
      if (arr) f[adst]++;
      @(posedge clk);
      #1;
      check(dv == smp, "demand_valid one cycle after sample");
      if (smp)
        for (int k = 0; k < 4; k++)
          check(int'(dem[k]) == want[k], $sformatf("cycle %0d demand %0d = %0d want %0d", c, k, dem[k], want[k]));
    end
    check(n_sat > 0 && n_qzero > 0, "saturation and empty backlog seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
