// bw_estimator: bandwidth demand estimator of one input port (line card).
//
// Once per period it turns the port's traffic history into a demand row for
// the next period, in cells per period (a rate r corresponds to r*T cells):
//   arrival predictor  p(k+1) = alpha*f(k-1) + (1-alpha)*p(k), alpha = 1/2,
//                      f(k-1) = cells that arrived during the period that
//                      just ended, p(k) = the previous prediction;
//   backlog predictor  q(k+1) = max(0, q(k) + p(k) - a(k)), q(k) = VOQ
//                      backlog at the start of the period, a(k) = cells
//                      allocated for the period now starting;
//   demand             d(k+1) = p(k+1) + q(k+1), saturated to L bits.
// alpha = 1/2 makes the predictor a shift; the halving truncates (own
// choice). `sample` is asserted in the first slot of each period; the arrival
// in that slot already counts towards the new period. `demand` is registered
// and `demand_valid` pulses one cycle after `sample`.
//
// Interface: `arrive/arrive_dst` one arrival per slot, `occ` the VOQ
// backlogs, `alloc` the rates in force. Synchronous active-low reset clears
// the counters and the prediction.
module bw_estimator #(
  parameter int unsigned N  = sbux_pkg::N_DEF,
  parameter int unsigned T  = sbux_pkg::T_DEF,
  parameter int unsigned L  = sbux_pkg::L_DEF,
  parameter int unsigned QW = $clog2(sbux_pkg::VOQ_DEPTH_DEF + 1),
  localparam int unsigned RW = $clog2(T + 1),
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 arrive,
  input  logic [IW-1:0]        arrive_dst,
  input  logic                 sample,
  input  logic [N-1:0][QW-1:0] occ,
  input  logic [N-1:0][RW-1:0] alloc,
  output logic [N-1:0][L-1:0]  demand,
  output logic                 demand_valid
);

  localparam int unsigned XW = L + 2;  // headroom before saturation

  logic [N-1:0][RW-1:0] fcnt;   // arrivals in the running period
  logic [N-1:0][L-1:0]  pred;   // p(k)

  logic [N-1:0][L-1:0]  pred_nx;
  logic [N-1:0][L-1:0]  dem_nx;
  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic [XW-1:0] qp, d;
      pred_nx[k] = L'(({{(XW-RW){1'b0}}, fcnt[k]} + {{(XW-L){1'b0}}, pred[k]}) >> 1);
      if ({{(XW-QW){1'b0}}, occ[k]} + {{(XW-L){1'b0}}, pred[k]} > {{(XW-RW){1'b0}}, alloc[k]})
        qp = {{(XW-QW){1'b0}}, occ[k]} + {{(XW-L){1'b0}}, pred[k]} - {{(XW-RW){1'b0}}, alloc[k]};
      else
        qp = '0;
      d = {{(XW-L){1'b0}}, pred_nx[k]} + qp;
      dem_nx[k] = (d > XW'({L{1'b1}})) ? {L{1'b1}} : L'(d);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fcnt         <= '0;
      pred         <= '0;
      demand       <= '0;
      demand_valid <= 1'b0;
    end else begin
      demand_valid <= sample;
      for (int k = 0; k < N; k++) begin
        logic hit;
        hit = arrive && arrive_dst == IW'(k);
        if (sample) begin
          fcnt[k]   <= RW'(hit);
          pred[k]   <= pred_nx[k];
          demand[k] <= dem_nx[k];
        end else if (hit && fcnt[k] != RW'(T)) begin
          fcnt[k] <= fcnt[k] + 1'b1;
        end
      end
    end
  end

endmodule
