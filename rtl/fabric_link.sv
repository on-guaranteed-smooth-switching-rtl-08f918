// fabric_link: fixed fabric-internal latency between a line card and the
// switch core.
//
// The input scheduler and its VOQs sit on the line card, the crosspoint
// buffers in the switch core, LAT slots away. The link is modelled as a
// LAT-stage register pipeline carrying a valid bit and a W-bit word; the
// switch compensates for it by starting the input schedulers' periods LAT
// slots before the output schedulers'. LAT = 0 is a plain wire. The latency
// value is this design's own choice: the architecture allows any value below
// the period T. Synchronous active-low reset clears the valid bits.
module fabric_link #(
  parameter int unsigned LAT = sbux_pkg::LAT_DEF,
  parameter int unsigned W   = sbux_pkg::CELL_W_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  if (LAT == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_pipe
    logic [LAT-1:0]        v;
    logic [W-1:0]          d [LAT];
    always_ff @(posedge clk) begin
      if (!rst_n) v <= '0;
      else begin
        v[0] <= in_valid;
        for (int k = 1; k < LAT; k++) v[k] <= v[k-1];
      end
    end
    always_ff @(posedge clk) begin
      d[0] <= in_data;
      for (int k = 1; k < LAT; k++) d[k] <= d[k-1];
    end
    assign out_valid = v[LAT-1];
    assign out_data  = d[LAT-1];
  end

endmodule
