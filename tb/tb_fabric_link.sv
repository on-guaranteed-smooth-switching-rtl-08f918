// tb_fabric_link: checks that words and valid bits leave the link exactly LAT
// slots after they enter, for LAT = 4 and LAT = 0, and that reset clears the
// valid bits.
module tb_fabric_link;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic iv, ov4, ov0; logic [7:0] id, od4, od0;
  fabric_link #(.LAT(4), .W(8)) u4 (.clk, .rst_n, .in_valid(iv), .in_data(id), .out_valid(ov4), .out_data(od4));
  fabric_link #(.LAT(0), .W(8)) u0 (.clk, .rst_n, .in_valid(iv), .in_data(id), .out_valid(ov0), .out_data(od0));

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       hv[$];
  logic [7:0] hd[$];
  initial begin
    iv = 1; id = 0;
    repeat (3) @(posedge clk);
    #1 check(!ov4, "reset clears valid");
    rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      iv = $urandom_range(0, 1) == 1;
      id = 8'($urandom);
      #1;
      check(ov0 == iv && od0 == id, "LAT 0 is a wire");
      hv.push_back(iv); hd.push_back(id);
      if (hv.size() > 4) begin
        check(ov4 == hv[0] && (!hv[0] || od4 == hd[0]), $sformatf("LAT 4 cycle %0d", c));
        void'(hv.pop_front()); void'(hd.pop_front());
      end else begin
        check(!ov4, "pipeline empty after reset");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
